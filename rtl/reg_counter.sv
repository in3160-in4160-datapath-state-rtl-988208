// Registered counter z <- z + 1.
//
// The smallest datapath: an adder adding the constant 1 to the register output,
// fed back into the register's D input, so z steps by one on every rising clock
// edge and wraps modulo 2**WIDTH. The register is what keeps the loop from
// being a combinational oscillator. The adder-plus-register structure is the
// original example; the width and the asynchronous active-high reset to zero
// are this design's choices.
module reg_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset,
  output logic [WIDTH-1:0] z
);

  logic [WIDTH-1:0] next_z;

  assign next_z = z + 1'b1;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) z <= '0;
    else       z <= next_z;
  end

endmodule
