// Self-checking testbench for amount_calc: random coin, payout and clear
// commands against a reference amount computed from the denominations.
module tb_amount_calc;
  localparam int W = 11;
  logic clk = 1'b0, reset;
  logic in01, in05, in10, in20, zero, accept_coin;
  logic dec50, dec100, dec200, dec500, dec20, dec10, dec05, dec01;
  logic [W-1:0] amount;
  int checks = 0, failures = 0;
  int ref_amount;

  amount_calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_inputs();
    {in01, in05, in10, in20, zero, accept_coin} = '0;
    {dec50, dec100, dec200, dec500, dec20, dec10, dec05, dec01} = '0;
  endtask

  task automatic check(string what);
    checks++;
    if (int'(amount) != ref_amount) begin
      failures++;
      $display("FAIL %s: amount=%0d expected %0d", what, amount, ref_amount);
    end
  endtask

  int coin_vals[4] = '{1, 5, 10, 20};
  int pay_vals[8]  = '{500, 200, 100, 50, 20, 10, 5, 1};

  initial begin
    idle_inputs();
    reset = 1'b1;
    #12 reset = 1'b0;
    ref_amount = 0;
    check("after reset");
    for (int round = 0; round < 40; round++) begin
      // clear
      @(negedge clk); idle_inputs(); zero = 1'b1;
      @(posedge clk); #1; ref_amount = 0; check("zero");
      // insert 1..100 coins
      for (int i = 0, n = 1 + $urandom % 100; i < n; i++) begin
        automatic int k = $urandom % 4;
        @(negedge clk); idle_inputs(); accept_coin = 1'b1;
        case (k)
          0: in01 = 1'b1;
          1: in05 = 1'b1;
          2: in10 = 1'b1;
          default: in20 = 1'b1;
        endcase
        @(posedge clk); #1; ref_amount += coin_vals[k]; check("add coin");
      end
      // a detected coin without accept_coin is not added
      @(negedge clk); idle_inputs(); in20 = 1'b1;
      @(posedge clk); #1; check("coin not accepted");
      // pay back largest denomination first
      while (ref_amount > 0) begin
        automatic int p = 0;
        while (pay_vals[p] > ref_amount) p++;
        @(negedge clk); idle_inputs();
        case (p)
          0: dec500 = 1'b1;
          1: dec200 = 1'b1;
          2: dec100 = 1'b1;
          3: dec50  = 1'b1;
          4: dec20  = 1'b1;
          5: dec10  = 1'b1;
          6: dec05  = 1'b1;
          default: dec01 = 1'b1;
        endcase
        @(posedge clk); #1; ref_amount -= pay_vals[p]; check("pay");
      end
    end
    // zero overrides accept_coin
    @(negedge clk); idle_inputs(); accept_coin = 1'b1; in10 = 1'b1;
    @(posedge clk); #1; ref_amount = 10; check("add 10");
    @(negedge clk); zero = 1'b1;
    @(posedge clk); #1; ref_amount = 0; check("zero over accept");
    // largest detected coin wins
    @(negedge clk); idle_inputs(); accept_coin = 1'b1; in05 = 1'b1; in20 = 1'b1;
    @(posedge clk); #1; ref_amount = 20; check("coin priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
