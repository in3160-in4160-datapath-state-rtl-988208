// Self-checking testbench for coin_counter: random inc/accept/dec/zero
// stimulus against a reference count, plus an asynchronous reset check.
module tb_coin_counter;
  localparam int W = 7;
  logic clk = 1'b0, reset, inc, accept, dec, zero;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_count;

  coin_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (int'(count) != ref_count) begin
      failures++;
      $display("FAIL %s: count=%0d expected %0d", what, count, ref_count);
    end
  endtask

  initial begin
    {inc, accept, dec, zero} = '0;
    reset = 1'b1;
    #12 reset = 1'b0;
    ref_count = 0;
    check("after reset");
    // count up 130 accepted coins: wraps at 128
    for (int i = 0; i < 130; i++) begin
      @(negedge clk);
      inc = 1'b1; accept = 1'b1; dec = 1'b0; zero = 1'b0;
      @(posedge clk); #1;
      ref_count = (ref_count + 1) % 128;
      check("count up");
    end
    // random mix
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      inc = 1'($urandom); accept = 1'($urandom); dec = 1'($urandom);
      zero = ($urandom % 8) == 0;
      @(posedge clk); #1;
      if (inc && accept) ref_count = (ref_count + 1) % 128;
      else if (dec)      ref_count = (ref_count + 127) % 128;
      else if (zero)     ref_count = 0;
      check("random");
    end
    // inc without accept does nothing
    @(negedge clk); {inc, accept, dec, zero} = 4'b1000;
    @(posedge clk); #1; check("inc without accept");
    // asynchronous reset away from a clock edge
    @(negedge clk); {inc, accept, dec, zero} = 4'b1100;
    #2 reset = 1'b1; #1;
    ref_count = 0; check("async reset");
    #1 reset = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
