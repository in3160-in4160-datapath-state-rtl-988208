// Top of the datapath-state-machine examples.
//
// The examples do not form one system, so they stand side by side here, each
// with its own ports and sharing only clk and reset:
//   em_*  : the coin exchange machine (control FSM + counters + amount register)
//   cnt_* : the registered counter z <- z + 1
//   ed_*  : the clock-synchronous edge detector
//   rd_*  : the enable register with asynchronous reset (pushbutton storage)
//   ra_*  : the repeated-addition state machine
// See each module for its behaviour and timing.
module fsmd_examples_top (
  input  logic        clk,
  input  logic        reset,
  // coin exchange machine
  input  logic        em_coin_sens,
  input  logic        em_in01,
  input  logic        em_in05,
  input  logic        em_in10,
  input  logic        em_in20,
  output logic        em_ready,
  output logic        em_accept_coin,
  output logic        em_out01,
  output logic        em_out05,
  output logic        em_out10,
  output logic        em_out20,
  output logic        em_out50,
  output logic        em_out100,
  output logic        em_out200,
  output logic        em_out500,
  // registered counter
  output logic [7:0]  cnt_z,
  // edge detector
  input  logic        ed_next_sig,
  output logic        ed_sig,
  output logic        ed_edge,
  output logic        ed_rising,
  // pushbutton register storage
  input  logic        rd_enable,
  input  logic [7:0]  rd_data_in,
  output logic [7:0]  rd_data_out,
  // repeated addition
  input  logic        ra_start,
  input  logic [7:0]  ra_a,
  input  logic [7:0]  ra_n,
  output logic        ra_busy,
  output logic        ra_done,
  output logic [15:0] ra_r
);

  exchange_machine em (
    .clk, .reset,
    .coin_sens(em_coin_sens),
    .in01(em_in01), .in05(em_in05), .in10(em_in10), .in20(em_in20),
    .ready(em_ready), .accept_coin(em_accept_coin),
    .out01(em_out01), .out05(em_out05), .out10(em_out10), .out20(em_out20),
    .out50(em_out50), .out100(em_out100), .out200(em_out200), .out500(em_out500)
  );

  reg_counter #(.WIDTH(8)) cnt (.clk, .reset, .z(cnt_z));

  edge_detector ed (
    .clk, .reset, .next_sig(ed_next_sig),
    .sig(ed_sig), .my_edge(ed_edge), .my_rising(ed_rising)
  );

  my_reader #(.WIDTH(8)) rd (
    .clk, .reset, .enable(rd_enable), .data_in(rd_data_in), .data_out(rd_data_out)
  );

  repeat_adder #(.A_WIDTH(8), .N_WIDTH(8)) ra (
    .clk, .reset, .start(ra_start), .a_in(ra_a), .n_in(ra_n),
    .busy(ra_busy), .done(ra_done), .r(ra_r)
  );

endmodule
