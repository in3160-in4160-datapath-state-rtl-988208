// Shared sizes, state type and denomination values of the coin exchange machine.
//
// The machine holds at most COIN_LIMIT (100) coins, so a 7-bit counter per coin
// type suffices, and the largest amount, 100 coins of 20 NOK = 2000 NOK, fits in
// 11 bits (2000 < 2048). These three numbers are the ones the design is built
// around; the state encoding is left to the synthesis tool.
package exchange_pkg;

  localparam int unsigned EM_COUNT_WIDTH  = 7;
  localparam int unsigned EM_AMOUNT_WIDTH = EM_COUNT_WIDTH + 4;
  localparam int unsigned EM_COIN_LIMIT   = 100;

  // Controller states: wait for a coin, count coins, pay out.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_COUNT = 2'd1,
    ST_PAY   = 2'd2
  } state_t;

  // Values, in NOK, of the accepted coins and of the bills and coins paid out.
  localparam int unsigned V01  = 1;
  localparam int unsigned V05  = 5;
  localparam int unsigned V10  = 10;
  localparam int unsigned V20  = 20;
  localparam int unsigned V50  = 50;
  localparam int unsigned V100 = 100;
  localparam int unsigned V200 = 200;
  localparam int unsigned V500 = 500;

endpackage
