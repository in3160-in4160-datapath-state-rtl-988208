// Repeated-addition datapath state machine (r <- r + a, n times).
//
// The "op" state adds a to the accumulator r and counts n down each clock:
//   r <- r + a;  n_next = n - 1;  n <- n_next
// and decides on n_next, the value n is about to take, rather than on the
// register n itself. Testing n_next = 0 leaves op exactly after the n-th
// addition, without an extra wait state and without testing a stale register.
// That state, with this decision, is the original example. Around it this
// design adds its own idle state and handshake: a start pulse in idle loads
// a and n and clears r; done pulses for one cycle when op is left, with
// r = a * n. start with n = 0 gives done at once with r = 0.
// Latency: n clocks in op after the start edge; done is high in the cycle
// after the last addition.
module repeat_adder #(
  parameter int unsigned A_WIDTH = 8,
  parameter int unsigned N_WIDTH = 8,
  parameter int unsigned R_WIDTH = A_WIDTH + N_WIDTH
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               start,
  input  logic [A_WIDTH-1:0] a_in,
  input  logic [N_WIDTH-1:0] n_in,
  output logic               busy,
  output logic               done,
  output logic [R_WIDTH-1:0] r
);

  typedef enum logic {S_IDLE = 1'b0, S_OP = 1'b1} state_t;

  state_t             state, next_state;
  logic [A_WIDTH-1:0] a;
  logic [N_WIDTH-1:0] n, n_next;

  assign n_next = n - 1'b1;
  assign busy   = state == S_OP;

  always_comb begin
    next_state = state;
    unique case (state)
      S_IDLE:  if (start && n_in != '0) next_state = S_OP;
      S_OP:    if (n_next == '0) next_state = S_IDLE;
      default: next_state = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= S_IDLE;
      a     <= '0;
      n     <= '0;
      r     <= '0;
      done  <= 1'b0;
    end else begin
      state <= next_state;
      done  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a    <= a_in;
          n    <= n_in;
          r    <= '0;
          done <= n_in == '0;
        end
        S_OP: begin
          r <= r + R_WIDTH'(a);
          n <= n_next;
          if (n_next == '0) done <= 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
