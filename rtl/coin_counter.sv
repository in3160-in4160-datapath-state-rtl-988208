// Coin counter: how many coins of one denomination the exchange machine holds.
//
// One instance per coin type (1, 5, 10, 20 NOK). On each rising clock edge the
// count steps by one according to a fixed priority:
//   inc && accept -> count + 1   (a coin of this type was let in)
//   dec           -> count - 1   (a coin of this type was paid out)
//   zero          -> 0           (controller clears all counters in idle)
//   otherwise     -> hold
// reset is asynchronous and active high and clears the count at once.
// The priority order and the asynchronous reset follow the original design.
// The counter wraps modulo 2**COUNT_WIDTH, as in the original; the controller
// can ask for a 1 NOK coin that the machine does not hold (see README), which
// then wraps this count.
module coin_counter #(
  parameter int unsigned COUNT_WIDTH = 7
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   inc,
  input  logic                   accept,
  input  logic                   dec,
  input  logic                   zero,
  output logic [COUNT_WIDTH-1:0] count
);

  logic [COUNT_WIDTH-1:0] next_count;

  always_comb begin
    if (inc && accept)   next_count = count + 1'b1;
    else if (dec)        next_count = count - 1'b1;
    else if (zero)       next_count = '0;
    else                 next_count = count;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) count <= '0;
    else       count <= next_count;
  end

endmodule
