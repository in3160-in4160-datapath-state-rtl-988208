// Self-checking testbench for reg_counter: z must step by one per clock from
// zero after reset and wrap after 2**WIDTH clocks.
module tb_reg_counter;
  logic clk = 1'b0, reset;
  logic [7:0] z;
  int checks = 0, failures = 0;

  reg_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    #12;
    checks++; if (z != 0) begin failures++; $display("FAIL reset: z=%0d", z); end
    reset = 1'b0;
    for (int i = 1; i <= 600; i++) begin
      @(posedge clk); #1;
      checks++;
      if (z != 8'(i)) begin failures++; $display("FAIL cycle %0d: z=%0d", i, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
