// cnn_transfer: transfer (activation) function y = f(Net) of a cell.
//
// net is the counter value in units of 1/15. With TF = TF_SATLIN (default)
// the output is Net clamped to -15..+15, i.e. the usual piecewise-linear CNN
// output 0.5*(|x+1| - |x-1|). With TF = TF_HARDLIM it is +15/15 for Net >= 0
// and -15/15 otherwise. The result is 5-bit sign-magnitude; zero is always
// +0. Combinational. The published cell has a transfer-function block with a
// 9-bit input and 5-bit output but does not fix its curve; both curves here
// are this design's choice.
module cnn_transfer
  import cnn_pkg::*;
#(
  parameter int       W  = ACC_W,
  parameter tf_mode_e TF = TF_SATLIN
) (
  input  logic signed [W-1:0] net,
  output cnn_val_t            y
);

  localparam logic signed [W:0] MAX = (W+1)'(SLOTS);

  logic signed [W:0] absn;  // one bit wider: |-2^(W-1)| fits

  always_comb begin
    absn = net < 0 ? -(W+1)'(net) : (W+1)'(net);
    if (TF == TF_HARDLIM) begin
      y.sign = net < 0;
      y.mag  = MAG_W'(SLOTS);
    end else begin
      y.sign = net < 0;
      y.mag  = absn > MAX ? MAG_W'(SLOTS) : absn[MAG_W-1:0];
    end
  end

endmodule
