// Self-checking testbench for control_fsm. The datapath status (coin counts,
// amount) and the coin inputs are driven at random; each cycle the outputs are
// compared with a reference written from the payout rules, and the reference
// state is advanced by the transition rules.
module tb_control_fsm;
  logic clk = 1'b0, reset;
  logic coin_sens, in01, in05, in10, in20;
  logic [6:0]  count01, count05, count10, count20;
  logic [10:0] amount;
  logic ready, accept_coin, out01, out05, out10, out20, out50, out100, out200, out500;
  logic reset_counters, reset_amount;
  int checks = 0, failures = 0;
  int ref_state;                    // 0 idle, 1 count, 2 pay
  int seen_state[3];
  int seen_out[8];

  control_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected payout: index into {500,200,100,50,20,10,5,1}, or -1.
  function automatic int expected_pay(int a, int c20, int c10, int c05);
    if (a >= 500) return 0;
    if (a >= 200) return 1;
    if (a >= 100) return 2;
    if (a >= 50)  return 3;
    if (a >= 20 && c20 > 0) return 4;
    if (a >= 10 && c10 > 0) return 5;
    if (a >= 5  && c05 > 0) return 6;
    if (a >= 1)  return 7;
    return -1;
  endfunction

  task automatic cmp(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (state %0d, amount %0d)", what, got, exp,
               ref_state, amount);
    end
  endtask

  initial begin
    {coin_sens, in01, in05, in10, in20} = '0;
    {count01, count05, count10, count20} = '0;
    amount = '0;
    reset = 1'b1;
    #12 reset = 1'b0;
    ref_state = 0;
    for (int i = 0; i < 20000; i++) begin
      int coins, pay;
      logic [7:0] outs;
      @(negedge clk);
      coin_sens = ($urandom % 4) == 0;
      {in01, in05, in10, in20} = '0;
      if ($urandom % 5 != 0) case ($urandom % 4)
        0: in01 = 1'b1; 1: in05 = 1'b1; 2: in10 = 1'b1; default: in20 = 1'b1;
      endcase
      // bias the coin total towards the 100-coin limit
      count01 = 7'($urandom % 30); count05 = 7'($urandom % 30);
      count10 = 7'($urandom % 30); count20 = 7'($urandom % 30);
      if ($urandom % 4 == 0) count20 = 0;
      if ($urandom % 4 == 0) count10 = 0;
      if ($urandom % 4 == 0) count05 = 0;
      case ($urandom % 4)
        0: amount = 11'($urandom % 2001);
        1: amount = 11'($urandom % 60);
        2: amount = 11'($urandom % 6);
        default: amount = 11'($urandom % 25);
      endcase
      coins = count01 + count05 + count10 + count20;
      #1;
      seen_state[ref_state]++;
      cmp(ready,          ref_state == 0, "ready");
      cmp(reset_counters, ref_state == 0, "reset_counters");
      cmp(reset_amount,   ref_state == 0, "reset_amount");
      cmp(accept_coin,    ref_state == 1 && coins < 100, "accept_coin");
      pay = (ref_state == 2) ? expected_pay(amount, count20, count10, count05) : -1;
      outs = {out500, out200, out100, out50, out20, out10, out05, out01};
      for (int k = 0; k < 8; k++) cmp(outs[7-k], pay == k, $sformatf("out[%0d]", k));
      if (pay >= 0) seen_out[pay]++;
      // reference next state
      case (ref_state)
        0: if (coin_sens) ref_state = 1;
        1: if (coins >= 100 || !(in01 || in05 || in10 || in20)) ref_state = 2;
        default: if (amount == 0) ref_state = 0;
      endcase
      @(posedge clk);
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen_out[k] == 0) begin failures++; $display("FAIL payout %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
