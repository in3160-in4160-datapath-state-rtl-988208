// End-to-end testbench for fsmd_examples_top at its default sizes. The coin
// exchange machine runs complete transactions (coin intake, payout of every
// denomination, the 100-coin limit, a coin type skipped because none is held)
// checked item by item against a reference and for their cycle count; at the
// same time the counter, edge detector, enable register and repeated-addition
// examples run and are checked each clock. Every mechanism is counted and a
// mechanism that never occurs is a failure.
module tb_fsmd_examples_top;
  import exchange_ref_pkg::*;

  logic clk = 1'b0, reset;
  logic em_coin_sens, em_in01, em_in05, em_in10, em_in20;
  logic em_ready, em_accept_coin;
  logic em_out01, em_out05, em_out10, em_out20, em_out50, em_out100, em_out200, em_out500;
  logic [7:0]  cnt_z;
  logic        ed_next_sig, ed_sig, ed_edge, ed_rising;
  logic        rd_enable;
  logic [7:0]  rd_data_in, rd_data_out;
  logic        ra_start, ra_busy, ra_done;
  logic [7:0]  ra_a, ra_n;
  logic [15:0] ra_r;

  int checks = 0, failures = 0;
  int n_limit = 0, n_no_more = 0, n_skip = 0, n_item[8];
  int n_rise = 0, n_fall = 0, n_hold = 0, n_load = 0, n_mult = 0, n_wrap = 0;
  bit em_done = 0;

  fsmd_examples_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // ---------------- small examples, checked every clock ----------------
  logic [7:0] z_ref, rd_ref;
  logic       ed_prev;
  int         ra_expect, ra_cnt, ra_n_now;
  bit         ra_running;

  always @(negedge clk) if (!reset) begin
    ed_next_sig <= ($urandom % 3 == 0) ? ~ed_next_sig : ed_next_sig;
    rd_enable   <= 1'($urandom);
    rd_data_in  <= 8'($urandom);
  end

  always @(posedge clk) if (!reset) begin
    #1;
    // registered counter
    z_ref = z_ref + 8'd1;
    expect_eq(int'(cnt_z), int'(z_ref), "counter z");
    if (z_ref == 8'd0) n_wrap++;
    // edge detector: compare with the value sampled at this edge
    expect_eq(int'(ed_sig), int'(ed_prev_next), "edge sig");
    // enable register
    if (rd_en_s) begin rd_ref = rd_in_s; n_load++; end else n_hold++;
    expect_eq(int'(rd_data_out), int'(rd_ref), "reader");
  end

  // values sampled just before each edge
  logic ed_prev_next, rd_en_s;
  logic [7:0] rd_in_s;
  always @(posedge clk) begin
    ed_prev_next <= ed_next_sig;
    rd_en_s      <= rd_enable;
    rd_in_s      <= rd_data_in;
  end

  // edge detector outputs between edges
  always @(negedge clk) if (!reset) begin
    #2;
    expect_eq(int'(ed_edge), int'(ed_sig != ed_next_sig), "my_edge");
    expect_eq(int'(ed_rising), int'(!ed_sig && ed_next_sig), "my_rising");
    if (!ed_sig && ed_next_sig) n_rise++;
    if (ed_sig && !ed_next_sig) n_fall++;
  end

  // repeated addition: back-to-back jobs
  task automatic ra_job(int a, int n);
    int cycles = 0;
    @(negedge clk);
    ra_a = 8'(a); ra_n = 8'(n); ra_start = 1'b1;
    @(posedge clk); @(negedge clk);
    ra_start = 1'b0;
    while (!ra_done && cycles < 300) begin @(posedge clk); @(negedge clk); cycles++; end
    expect_eq(cycles, n, "repeat_adder latency");
    expect_eq(int'(ra_r), a * n, "repeat_adder result");
    n_mult++;
  endtask

  initial begin
    ra_start = 1'b0; ra_a = '0; ra_n = '0;
    @(negedge reset);
    ra_job(0, 0);
    ra_job(255, 255);
    for (int i = 0; i < 40; i++) ra_job($urandom % 256, $urandom % 64);
  end

  // ---------------- coin exchange machine ----------------
  function automatic logic [7:0] outs();
    return {em_out01, em_out05, em_out10, em_out20, em_out50, em_out100, em_out200, em_out500};
  endfunction

  task automatic transaction(int types[$]);
    int cnt[4] = '{0, 0, 0, 0};
    int amount = 0, accepted = 0, cycles = 0, items = 0, item;
    bit limit_hit = 0;
    @(negedge clk);
    expect_eq(int'(em_ready), 1, "ready in idle");
    em_coin_sens = 1'b1;
    @(posedge clk); cycles++;
    @(negedge clk);
    em_coin_sens = 1'b0;
    foreach (types[i]) begin
      {em_in20, em_in10, em_in05, em_in01} = coin_onehot(types[i]);
      #1;
      if (accepted < 100) begin
        expect_eq(int'(em_accept_coin), 1, "intake open");
        cnt[types[i]]++;
        accepted++;
        amount += COIN_VALUE[types[i]];
      end else begin
        expect_eq(int'(em_accept_coin), 0, "intake closed at limit");
        limit_hit = 1;
      end
      @(posedge clk); cycles++;
      @(negedge clk);
      if (limit_hit) break;
    end
    {em_in20, em_in10, em_in05, em_in01} = '0;
    if (limit_hit) n_limit++;
    else begin
      if (accepted == 100) n_limit++; else n_no_more++;
      @(posedge clk); cycles++;
      @(negedge clk);
    end
    forever begin
      #1;
      item = next_item(amount, cnt[3], cnt[2], cnt[1]);
      expect_eq(int'(outs()), item < 0 ? 0 : (1 << item), "payout item");
      if (item < 0) break;
      n_item[item]++;
      if ((item == 5 && amount >= 20) || (item == 6 && amount >= 10) ||
          (item == 7 && amount >= 5)) n_skip++;
      amount -= PAY_VALUE[item];
      if (item >= 4) cnt[7 - item]--;
      items++;
      @(posedge clk); cycles++;
      @(negedge clk);
      if (items > 3000) break;
    end
    @(posedge clk); cycles++;
    #1;
    expect_eq(int'(em_ready), 1, "back to idle");
    expect_eq(cycles, 1 + accepted + 1 + items + 1, "transaction cycle count");
  endtask

  initial begin
    int types[$];
    {em_coin_sens, em_in01, em_in05, em_in10, em_in20} = '0;
    ed_next_sig = 1'b0; rd_enable = 1'b0; rd_data_in = '0;
    z_ref = '0; rd_ref = '0;
    reset = 1'b1;
    #12 reset = 1'b0;
    // 101 x 20 NOK: limit, then 500 x 4
    types = {}; repeat (101) types.push_back(3); transaction(types);
    // 388 NOK = 18 x 20 + 2 x 10 + 5 + 3 x 1: pays 200, 100, 50, 20, 10, 5, 1, 1, 1
    types = {}; repeat (18) types.push_back(3);
    types.push_back(2); types.push_back(2); types.push_back(1);
    repeat (3) types.push_back(0);
    transaction(types);
    // 60 NOK in 20s: 50 bill, then 10 NOK with no 10 or 5 held -> 1 NOK coins
    types = '{3, 3, 3}; transaction(types);
    for (int r = 0; r < 20; r++) begin
      automatic int n = 1 + $urandom % 110;
      types = {};
      repeat (n) types.push_back(int'($urandom % 4));
      transaction(types);
    end
    em_done = 1;
    wait (n_mult >= 42);
    checks++; if (n_limit == 0)   begin failures++; $display("FAIL limit never reached"); end
    checks++; if (n_no_more == 0) begin failures++; $display("FAIL no-more-coins never seen"); end
    checks++; if (n_skip == 0)    begin failures++; $display("FAIL coin skip never seen"); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (n_item[k] == 0) begin failures++; $display("FAIL item %0d never paid", k); end
    end
    checks++; if (n_rise == 0 || n_fall == 0) begin failures++; $display("FAIL edges"); end
    checks++; if (n_hold == 0 || n_load == 0) begin failures++; $display("FAIL reader"); end
    checks++; if (n_wrap == 0) begin failures++; $display("FAIL counter never wrapped"); end
    $display("limit=%0d no_more=%0d skip=%0d rise=%0d fall=%0d load=%0d hold=%0d wrap=%0d mult=%0d",
             n_limit, n_no_more, n_skip, n_rise, n_fall, n_load, n_hold, n_wrap, n_mult);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
