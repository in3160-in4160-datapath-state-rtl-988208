// Self-checking testbench for edge_detector: a random input sequence, changed
// between clock edges, against the previous sampled value kept here.
module tb_edge_detector;
  logic clk = 1'b0, reset, next_sig, sig, my_edge, my_rising;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0;
  logic prev;

  edge_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b expected %0b", what, got, exp); end
  endtask

  initial begin
    next_sig = 1'b0;
    reset = 1'b1;
    #12 reset = 1'b0;
    prev = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      next_sig = ($urandom % 3) == 0 ? ~next_sig : next_sig;
      #1;
      cmp(sig, prev, "sig");
      cmp(my_edge, prev != next_sig, "my_edge");
      cmp(my_rising, !prev && next_sig, "my_rising");
      if (!prev && next_sig) n_rise++;
      if (prev && !next_sig) n_fall++;
      @(posedge clk);
      prev = next_sig;
    end
    checks++; if (n_rise == 0 || n_fall == 0) begin failures++; $display("FAIL no edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
