// Self-checking testbench for my_reader: data_out must take data_in on a
// clock edge only when enable is high, hold otherwise, and clear at once on
// an asynchronous reset.
module tb_my_reader;
  logic clk = 1'b0, reset, enable;
  logic [7:0] data_in, data_out, expected;
  int checks = 0, failures = 0;

  my_reader dut (.*);

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
    if (data_out !== expected) begin
      failures++;
      $display("FAIL %s: data_out=%h expected %h", what, data_out, expected);
    end
  endtask

  initial begin
    enable = 1'b0; data_in = '0;
    reset = 1'b1;
    #12 reset = 1'b0;
    expected = '0;
    check("reset");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      enable  = 1'($urandom);
      data_in = 8'($urandom);
      // input changes between edges must not pass through
      #2 check("between edges");
      @(posedge clk); #1;
      if (enable) expected = data_in;
      check("after edge");
      if (i % 97 == 50) begin
        #1 reset = 1'b1; #1;
        expected = '0;
        check("async reset");
        reset = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
