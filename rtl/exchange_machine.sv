// Coin exchange machine: structural top.
//
// Coins arrive one per clock at the intake. The control FSM opens the intake
// (accept_coin) and the four coin counters and the amount register count the
// coins and their value. When no more coins come, or 100 are held, the FSM pays
// the amount back one item per clock: the largest bills possible (50, 100, 200,
// 500 NOK), then the fewest coins from those the machine holds. The ready output
// drives the green "can accept coins" LED.
//
// Wiring (as in the original design): each counter counts up on its inXX while
// accept_coin is on, counts down on the matching outXX, and is cleared by
// reset_counters; amount_calc adds on inXX with accept_coin, subtracts on every
// outXX, and is cleared by reset_amount. The coin sensor, coin type detector and
// dispensers are external; their signals are this module's ports.
// Timing: one clock from coin_sens to the count state; each accepted coin is
// counted on the clock edge where its inXX is high; payout takes one clock per
// item plus one clock to see a zero amount.
module exchange_machine
  import exchange_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic coin_sens,
  input  logic in01,
  input  logic in05,
  input  logic in10,
  input  logic in20,
  output logic ready,
  output logic accept_coin,
  output logic out01,
  output logic out05,
  output logic out10,
  output logic out20,
  output logic out50,
  output logic out100,
  output logic out200,
  output logic out500
);

  logic [EM_COUNT_WIDTH-1:0]  count01, count05, count10, count20;
  logic [EM_AMOUNT_WIDTH-1:0] amount;
  logic                    reset_counters, reset_amount;

  control_fsm #(
    .COUNT_WIDTH (EM_COUNT_WIDTH),
    .AMOUNT_WIDTH(EM_AMOUNT_WIDTH),
    .COIN_LIMIT  (EM_COIN_LIMIT)
  ) fsm (
    .clk, .reset, .coin_sens, .in01, .in05, .in10, .in20,
    .count01, .count05, .count10, .count20, .amount,
    .ready, .accept_coin,
    .out01, .out05, .out10, .out20, .out50, .out100, .out200, .out500,
    .reset_counters, .reset_amount
  );

  coin_counter #(.COUNT_WIDTH(EM_COUNT_WIDTH)) counter01 (
    .clk, .reset, .inc(in01), .accept(accept_coin), .dec(out01),
    .zero(reset_counters), .count(count01)
  );
  coin_counter #(.COUNT_WIDTH(EM_COUNT_WIDTH)) counter05 (
    .clk, .reset, .inc(in05), .accept(accept_coin), .dec(out05),
    .zero(reset_counters), .count(count05)
  );
  coin_counter #(.COUNT_WIDTH(EM_COUNT_WIDTH)) counter10 (
    .clk, .reset, .inc(in10), .accept(accept_coin), .dec(out10),
    .zero(reset_counters), .count(count10)
  );
  coin_counter #(.COUNT_WIDTH(EM_COUNT_WIDTH)) counter20 (
    .clk, .reset, .inc(in20), .accept(accept_coin), .dec(out20),
    .zero(reset_counters), .count(count20)
  );

  amount_calc #(.AMOUNT_WIDTH(EM_AMOUNT_WIDTH)) amount_reg (
    .clk, .reset, .in01, .in05, .in10, .in20,
    .zero(reset_amount), .accept_coin,
    .dec50(out50), .dec100(out100), .dec200(out200), .dec500(out500),
    .dec20(out20), .dec10(out10), .dec05(out05), .dec01(out01),
    .amount
  );

endmodule
