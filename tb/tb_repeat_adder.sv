// Self-checking testbench for repeat_adder: r must equal a * n when done
// pulses, done must come exactly n clocks after start (at once for n = 0),
// and busy must be high for those n clocks.
module tb_repeat_adder;
  logic clk = 1'b0, reset, start, busy, done;
  logic [7:0] a_in, n_in;
  logic [15:0] r;
  int checks = 0, failures = 0;

  repeat_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic run(int a, int n);
    int cycles = 0;
    @(negedge clk);
    a_in = 8'(a); n_in = 8'(n); start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    while (!done && cycles < 300) begin
      expect_eq(int'(busy), 1, "busy while adding");
      @(posedge clk); @(negedge clk);
      cycles++;
    end
    expect_eq(cycles, n, "latency");
    expect_eq(int'(r), a * n, $sformatf("r for a=%0d n=%0d", a, n));
    expect_eq(int'(busy), 0, "idle after done");
    @(posedge clk); @(negedge clk);
    expect_eq(int'(done), 0, "done is one cycle");
  endtask

  initial begin
    start = 1'b0; a_in = '0; n_in = '0;
    reset = 1'b1;
    #12 reset = 1'b0;
    run(7, 1);
    run(3, 0);
    run(255, 255);
    run(0, 5);
    for (int i = 0; i < 300; i++) run($urandom % 256, $urandom % 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
