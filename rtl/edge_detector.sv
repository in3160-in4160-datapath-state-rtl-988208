// Edge detector clocked by the system clock only.
//
// Instead of clocking a register on the signal itself, the incoming signal
// next_sig is registered into sig on each rising clock edge and compared with
// its registered copy:
//   my_edge   = sig != next_sig            (the signal differs from last cycle)
//   my_rising = !sig && next_sig           (it was 0 and is now 1)
// Both outputs are combinational from next_sig and valid in the same cycle as
// the change; they are meant to be sampled at the next clock edge. The
// comparison structure follows the original example; the asynchronous
// active-high reset (sig <= 0) is this design's addition so that the register
// starts known.
module edge_detector (
  input  logic clk,
  input  logic reset,
  input  logic next_sig,
  output logic sig,
  output logic my_edge,
  output logic my_rising
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) sig <= 1'b0;
    else       sig <= next_sig;
  end

  assign my_edge   = sig != next_sig;
  assign my_rising = !sig && next_sig;

endmodule
