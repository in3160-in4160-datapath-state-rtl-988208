// Amount calculator: the register A that holds what the customer is owed, in NOK.
//
// While the intake is open (accept_coin) the value of the detected coin is
// added: A <- A + 20/10/5/1, with 20 NOK taking precedence if the detector ever
// reports more than one type. While paying, the value of the bill or coin
// dispensed this cycle is subtracted: A <- A - 500/200/.../1, the largest
// denomination taking precedence. zero clears A and overrides both; reset is
// asynchronous and active high. One update per rising clock edge.
// AMOUNT_WIDTH = 11 holds the largest amount, 100 coins of 20 NOK = 2000 NOK.
// All of this follows the original design; the adder/subtractor is written as
// one selected addend and one selected subtrahend, as in its datapath drawing.
module amount_calc
  import exchange_pkg::*;
#(
  parameter int unsigned AMOUNT_WIDTH = EM_AMOUNT_WIDTH
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    in01,
  input  logic                    in05,
  input  logic                    in10,
  input  logic                    in20,
  input  logic                    zero,
  input  logic                    accept_coin,
  input  logic                    dec50,
  input  logic                    dec100,
  input  logic                    dec200,
  input  logic                    dec500,
  input  logic                    dec20,
  input  logic                    dec10,
  input  logic                    dec05,
  input  logic                    dec01,
  output logic [AMOUNT_WIDTH-1:0] amount
);

  logic [AMOUNT_WIDTH-1:0] coin_value;   // value of the coin being let in
  logic [AMOUNT_WIDTH-1:0] paid_value;   // value being paid out
  logic [AMOUNT_WIDTH-1:0] next_amount;

  always_comb begin
    if      (in20) coin_value = AMOUNT_WIDTH'(V20);
    else if (in10) coin_value = AMOUNT_WIDTH'(V10);
    else if (in05) coin_value = AMOUNT_WIDTH'(V05);
    else if (in01) coin_value = AMOUNT_WIDTH'(V01);
    else           coin_value = '0;

    if      (dec500) paid_value = AMOUNT_WIDTH'(V500);
    else if (dec200) paid_value = AMOUNT_WIDTH'(V200);
    else if (dec100) paid_value = AMOUNT_WIDTH'(V100);
    else if (dec50)  paid_value = AMOUNT_WIDTH'(V50);
    else if (dec20)  paid_value = AMOUNT_WIDTH'(V20);
    else if (dec10)  paid_value = AMOUNT_WIDTH'(V10);
    else if (dec05)  paid_value = AMOUNT_WIDTH'(V05);
    else if (dec01)  paid_value = AMOUNT_WIDTH'(V01);
    else             paid_value = '0;

    if (zero)             next_amount = '0;
    else if (accept_coin) next_amount = amount + coin_value;
    else                  next_amount = amount - paid_value;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) amount <= '0;
    else       amount <= next_amount;
  end

endmodule
