// Control FSM of the coin exchange machine.
//
// Three states, with Mealy outputs decided from the datapath status:
//   idle  : ready (green LED) on, counters and amount cleared. Leaves for count
//           when coin_sens reports a coin at the intake.
//   count : accept_coin is on while fewer than COIN_LIMIT coins are held; each
//           cycle one detected coin (in01..in20) is counted by the datapath.
//           Leaves for pay when the limit is reached or no coin is detected.
//   pay   : each cycle dispenses exactly one bill or coin, chosen greedily from
//           the amount still owed: 500, 200, 100 or 50 NOK bills while the
//           amount reaches them (bills are in infinite supply), then 20, 10 and
//           5 NOK coins only while the amount reaches them and the machine holds
//           such a coin, and 1 NOK otherwise. Returns to idle when the amount is
//           zero.
// The datapath subtracts the dispensed value from the amount and decrements the
// matching coin counter on the same clock edge, so one item leaves per cycle.
// The coin total is summed here from the four counters, as in the original
// partitioning. States, transitions, output priorities and COIN_LIMIT follow the
// original design. This design's own choices: the asynchronous active-high
// reset to idle, the 2-bit state encoding, and a coin sum two bits wider than a
// counter so that it cannot overflow.
module control_fsm
  import exchange_pkg::*;
#(
  parameter int unsigned COUNT_WIDTH  = EM_COUNT_WIDTH,
  parameter int unsigned AMOUNT_WIDTH = COUNT_WIDTH + 4,
  parameter int unsigned COIN_LIMIT   = EM_COIN_LIMIT
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    coin_sens,
  input  logic                    in01,
  input  logic                    in05,
  input  logic                    in10,
  input  logic                    in20,
  input  logic [COUNT_WIDTH-1:0]  count01,
  input  logic [COUNT_WIDTH-1:0]  count05,
  input  logic [COUNT_WIDTH-1:0]  count10,
  input  logic [COUNT_WIDTH-1:0]  count20,
  input  logic [AMOUNT_WIDTH-1:0] amount,
  output logic                    ready,
  output logic                    accept_coin,
  output logic                    out01,
  output logic                    out05,
  output logic                    out10,
  output logic                    out20,
  output logic                    out50,
  output logic                    out100,
  output logic                    out200,
  output logic                    out500,
  output logic                    reset_counters,
  output logic                    reset_amount
);

  localparam int unsigned COINS_WIDTH = COUNT_WIDTH + 2;

  state_t                 current_state, next_state;
  logic [COINS_WIDTH-1:0] coins;
  logic                   coin_seen;
  logic                   below_limit;

  assign coins = COINS_WIDTH'(count01) + COINS_WIDTH'(count05)
               + COINS_WIDTH'(count10) + COINS_WIDTH'(count20);
  assign coin_seen   = in01 | in05 | in10 | in20;
  assign below_limit = 32'(coins) < COIN_LIMIT;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) current_state <= ST_IDLE;
    else       current_state <= next_state;
  end

  // Next state.
  always_comb begin
    next_state = current_state;
    unique case (current_state)
      ST_IDLE:  if (coin_sens) next_state = ST_COUNT;
      ST_COUNT: if (!below_limit || !coin_seen) next_state = ST_PAY;
      ST_PAY:   if (amount == '0) next_state = ST_IDLE;
      default:  next_state = ST_IDLE;
    endcase
  end

  // Outputs.
  always_comb begin
    ready          = 1'b0;
    accept_coin    = 1'b0;
    reset_counters = 1'b0;
    reset_amount   = 1'b0;
    out01  = 1'b0;
    out05  = 1'b0;
    out10  = 1'b0;
    out20  = 1'b0;
    out50  = 1'b0;
    out100 = 1'b0;
    out200 = 1'b0;
    out500 = 1'b0;
    unique case (current_state)
      ST_IDLE: begin
        reset_counters = 1'b1;
        reset_amount   = 1'b1;
        ready          = 1'b1;
      end
      ST_COUNT: accept_coin = below_limit;
      ST_PAY: begin
        if      (32'(amount) >= V500) out500 = 1'b1;
        else if (32'(amount) >= V200) out200 = 1'b1;
        else if (32'(amount) >= V100) out100 = 1'b1;
        else if (32'(amount) >= V50)  out50  = 1'b1;
        else if (32'(amount) >= V20 && count20 != '0) out20 = 1'b1;
        else if (32'(amount) >= V10 && count10 != '0) out10 = 1'b1;
        else if (32'(amount) >= V05 && count05 != '0) out05 = 1'b1;
        else if (amount != '0) out01 = 1'b1;
      end
      default: ;
    endcase
  end

  // At most one bill or coin is dispensed per cycle.
  a_one_payout: assert property (@(posedge clk) disable iff (reset)
    $onehot0({out01, out05, out10, out20, out50, out100, out200, out500}));

  // The intake is never open outside the count state.
  a_intake_only_in_count: assert property (@(posedge clk) disable iff (reset)
    accept_coin |-> current_state == ST_COUNT);

endmodule
