// Pushbutton register storage: an enable register with asynchronous reset.
//
// On each rising clock edge, output takes the value of input when enable is
// high and holds otherwise; the hold is a multiplexer feeding output back to
// the register, so nothing is stored outside the clock edge and no latch is
// formed. reset is asynchronous, active high and has priority over the clock,
// clearing output to zero. Width (8), port names and reset priority follow the
// original example. The port "input" of the original is called data_in here,
// and "output" data_out, since both are SystemVerilog keywords.
module my_reader #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             enable,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] next_out;

  assign next_out = enable ? data_in : data_out;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) data_out <= '0;
    else       data_out <= next_out;
  end

endmodule
