// End-to-end testbench for exchange_machine. A coin source drops one coin per
// clock while accept_coin is high; the payout is checked item by item against
// a reference that tracks the amount and the coins held, and the cycle count
// of each transaction is checked (1 idle->count clock, one clock per accepted
// coin, one clock to see no coin or the limit, one clock per paid item, one
// clock to see a zero amount). Each mechanism is counted and must occur.
module tb_exchange_machine;
  import exchange_ref_pkg::*;

  logic clk = 1'b0, reset;
  logic coin_sens, in01, in05, in10, in20;
  logic ready, accept_coin, out01, out05, out10, out20, out50, out100, out200, out500;
  int checks = 0, failures = 0;
  int n_limit = 0, n_no_more = 0, n_skip = 0, n_item[8];

  exchange_machine dut (.*);

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
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [7:0] outs();
    return {out01, out05, out10, out20, out50, out100, out200, out500};
  endfunction

  // One transaction: offer the coins of 'types' (0..3), then collect payout.
  task automatic transaction(int types[$]);
    int cnt[4] = '{0, 0, 0, 0};
    int amount = 0, accepted = 0, cycles = 0, items = 0, item;
    bit limit_hit = 0;
    @(negedge clk);
    expect_eq(int'(ready), 1, "ready in idle");
    expect_eq(int'(accept_coin), 0, "intake closed in idle");
    coin_sens = 1'b1;
    @(posedge clk); cycles++;
    @(negedge clk);
    coin_sens = 1'b0;
    foreach (types[i]) begin
      {in20, in10, in05, in01} = coin_onehot(types[i]);
      #1;
      expect_eq(int'(ready), 0, "ready off while counting");
      if (accepted < 100) begin
        expect_eq(int'(accept_coin), 1, "intake open");
        cnt[types[i]]++;
        accepted++;
        amount += COIN_VALUE[types[i]];
      end else begin
        expect_eq(int'(accept_coin), 0, "intake closed at limit");
        limit_hit = 1;
      end
      @(posedge clk); cycles++;
      @(negedge clk);
      if (limit_hit) break;
    end
    {in20, in10, in05, in01} = '0;
    if (limit_hit) n_limit++;
    else begin
      #1;
      expect_eq(int'(accept_coin), int'(accepted < 100), "intake after last coin");
      if (accepted == 100) n_limit++; else n_no_more++;
      @(posedge clk); cycles++;
      @(negedge clk);
    end
    // pay state: one item per clock until the amount is zero
    forever begin
      logic [7:0] got;
      #1;
      item = next_item(amount, cnt[3], cnt[2], cnt[1]);
      got = outs();
      expect_eq(int'(got), item < 0 ? 0 : (1 << item), "payout item");
      expect_eq(int'(accept_coin), 0, "intake closed while paying");
      if (item < 0) break;
      n_item[item]++;
      if ((item == 5 && amount >= 20) || (item == 6 && amount >= 10) ||
          (item == 7 && amount >= 5)) n_skip++;
      amount -= PAY_VALUE[item];
      if (item == 4) cnt[3]--;
      if (item == 5) cnt[2]--;
      if (item == 6) cnt[1]--;
      if (item == 7) cnt[0]--;
      items++;
      @(posedge clk); cycles++;
      @(negedge clk);
      if (items > 3000) break;
    end
    @(posedge clk); cycles++;
    #1;
    expect_eq(int'(ready), 1, "back to idle");
    expect_eq(cycles, 1 + accepted + 1 + items + 1, "transaction cycle count");
  endtask

  initial begin
    int types[$];
    {coin_sens, in01, in05, in10, in20} = '0;
    reset = 1'b1;
    #12 reset = 1'b0;
    // fixed cases: 1 coin of each type, 100 x 20 NOK, 101 x 20 NOK
    for (int t = 0; t < 4; t++) begin types = '{t}; transaction(types); end
    types = {}; repeat (100) types.push_back(3); transaction(types);
    types = {}; repeat (101) types.push_back(3); transaction(types);
    // 2 + 2 + 2 x 10 + 3 x 5 ... coins that leave a remainder not payable in
    // held 10s: 3 x 20 NOK = 60 -> 50 bill, then 10 NOK with only 20s held
    types = '{3, 3, 3}; transaction(types);
    // random transactions
    for (int r = 0; r < 300; r++) begin
      automatic int n = 1 + $urandom % 120;
      automatic int bias = $urandom % 5;
      types = {};
      repeat (n) types.push_back((bias < 4 && ($urandom % 2) != 0) ? bias : int'($urandom % 4));
      transaction(types);
    end
    checks++; if (n_limit == 0)   begin failures++; $display("FAIL limit never reached"); end
    checks++; if (n_no_more == 0) begin failures++; $display("FAIL no-more-coins never seen"); end
    checks++; if (n_skip == 0)    begin failures++; $display("FAIL coin skip never seen"); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (n_item[k] == 0) begin failures++; $display("FAIL item %0d never paid", k); end
    end
    $display("limit=%0d no_more=%0d skip=%0d items=%p", n_limit, n_no_more, n_skip, n_item);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
