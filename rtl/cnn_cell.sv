// cnn_cell: one cell of the time-coded digital CNN.
//
// Data path (one pass per slot): the N time-coded inputs in_t/sin (outputs of
// the 8 neighbours and, on input 5, of the cell itself) are multiplied by the
// time-coded weights w_t/sw_t in cnn_and_xor; cnn_counter sums the signed
// products; on the last slot of an iteration cnn_transfer maps the sum to a
// 5-bit value, which passes the mx into the cnn_converter register. The
// register drives data_out and, as a time interval, statex_o/sign_o.
//
// mx: while load is high the register takes new_data instead of the transfer
// function output and the counter is cleared, so loading the image takes one
// clock and the next iteration starts cleanly.
//
// Timing: en advances the iteration one slot per clock; with last high on the
// 15th slot, data_out holds f(Net) one clock after that slot, so an iteration
// takes 15 clocks. The block structure follows the published cell diagram;
// the load and enable protocol is this design's choice. The counter's acc
// output is left unused here (only net is needed); lint reports it as unused.
module cnn_cell
  import cnn_pkg::*;
#(
  parameter int       N  = N_IN,
  parameter tf_mode_e TF = TF_SATLIN
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              en,
  input  logic              last,
  input  logic [SLOT_W-1:0] slot,
  input  logic [N-1:0]      in_t,
  input  logic [N-1:0]      sin,
  input  logic [N-1:0]      w_t,
  input  logic [N-1:0]      sw_t,
  input  cnn_val_t          new_data,
  output cnn_val_t          data_out,
  output logic              statex_o,
  output logic              sign_o
);

  logic [N-1:0]            hit, neg;
  logic signed [ACC_W-1:0] acc, net;
  cnn_val_t                tf_y, mx_y;

  cnn_and_xor #(.N(N)) u_mult (
    .in_t(in_t), .sin(sin), .w_t(w_t), .sw_t(sw_t), .hit(hit), .neg(neg)
  );

  cnn_counter #(.N(N), .W(ACC_W)) u_cnt (
    .clk(clk), .rst_n(rst_n), .clr(load), .en(en), .last(last),
    .hit(hit), .neg(neg), .acc(acc), .net(net)
  );

  cnn_transfer #(.W(ACC_W), .TF(TF)) u_tf (.net(net), .y(tf_y));

  // mx: new data or transfer-function result
  assign mx_y = load ? new_data : tf_y;

  cnn_converter u_conv (
    .clk(clk), .rst_n(rst_n), .ld(load | (en & last)), .d(mx_y),
    .slot(slot), .data_out(data_out), .statex_o(statex_o), .sign_o(sign_o)
  );

endmodule
