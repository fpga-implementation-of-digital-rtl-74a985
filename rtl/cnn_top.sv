// cnn_top: complete time-coded digital cellular neural network.
//
// One cnn_ctrl sequences 15-slot iterations, one cnn_weight_gen turns the
// 3x3 template (wgt[0..8], inputs 1..9 of every cell) into time patterns, and
// a ROWS x COLS cnn_array of cells computes y = f(sum_k w_k * x_k) for every
// cell in parallel, one iteration every 15 clocks.
//
// Use: hold the template on wgt, present the image on data_in and pulse load
// for one clock; then hold run high. iter_done pulses on the last slot of each
// iteration and data_out holds the new image from the next clock on; iter_cnt
// counts iterations since the load. The boundary ports (see cnn_array) give
// the values outside the grid, or connect to a neighbouring tile.
//
// The cell, the coupling, the time coding and the 4x4 default size follow the
// published design; the control protocol is this design's choice.
module cnn_top
  import cnn_pkg::*;
#(
  parameter int       ROWS   = 4,
  parameter int       COLS   = 4,
  parameter tf_mode_e TF     = TF_SATLIN,
  parameter int       ITER_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              run,
  input  cnn_val_t          wgt      [N_IN],
  input  cnn_val_t          data_in  [ROWS][COLS],
  output cnn_val_t          data_out [ROWS][COLS],
  input  tsig_t             n_in [COLS+2],
  input  tsig_t             s_in [COLS+2],
  input  tsig_t             w_in [ROWS],
  input  tsig_t             e_in [ROWS],
  output tsig_t             n_out [COLS],
  output tsig_t             s_out [COLS],
  output tsig_t             w_out [ROWS],
  output tsig_t             e_out [ROWS],
  output logic [SLOT_W-1:0] slot,
  output logic              iter_done,
  output logic [ITER_W-1:0] iter_cnt
);

  logic            en, last;
  logic [N_IN-1:0] w_t, sw_t;

  cnn_ctrl #(.ITER_W(ITER_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .load(load), .run(run), .slot(slot),
    .en(en), .last(last), .iter_done(iter_done), .iter_cnt(iter_cnt)
  );

  cnn_weight_gen #(.N(N_IN)) u_wgen (
    .slot(slot), .wgt(wgt), .w_t(w_t), .sw_t(sw_t)
  );

  cnn_array #(.ROWS(ROWS), .COLS(COLS), .TF(TF)) u_array (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .last(last),
    .slot(slot), .w_t(w_t), .sw_t(sw_t),
    .data_in(data_in), .data_out(data_out),
    .n_in(n_in), .s_in(s_in), .w_in(w_in), .e_in(e_in),
    .n_out(n_out), .s_out(s_out), .w_out(w_out), .e_out(e_out)
  );

endmodule
