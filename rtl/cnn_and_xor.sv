// cnn_and_xor: the multiplier of a cell, one AND and one XOR gate per input.
//
// In each slot, hit[i] = in_t[i] & w_t[i] is high when both the input
// interval and the weight pattern are high; counted over the 15 slots of an
// iteration it gives |x_i * w_i| in units of 1/15. neg[i] = sin[i] ^ sw[i] is
// the sign of that product. Purely combinational. The gate structure follows
// the published cell diagram.
module cnn_and_xor
  import cnn_pkg::*;
#(
  parameter int N = N_IN
) (
  input  logic [N-1:0] in_t,
  input  logic [N-1:0] sin,
  input  logic [N-1:0] w_t,
  input  logic [N-1:0] sw_t,
  output logic [N-1:0] hit,
  output logic [N-1:0] neg
);

  assign hit = in_t & w_t;
  assign neg = sin ^ sw_t;

endmodule
