// cnn_weight_gen: turns the 3x3 template weights into time-coded signals.
//
// For each of the N_IN weights (5-bit sign-magnitude) it outputs, in every
// clock slot, one bit of that weight's 15-slot pattern (cnn_pkg::wgt_pattern)
// and the weight sign. Since the template is the same for every cell, one
// generator drives the whole array.
//
// Interface: slot is the common slot count 0..SLOTS-1 from cnn_ctrl; wgt is
// the template, expected stable while the network runs. w_t / sw_t are
// combinational in slot and wgt, so they are valid in the same cycle as the
// cells' input intervals. The patterns are the published ones; sharing one
// generator and the purely combinational timing are this design's choices.
module cnn_weight_gen
  import cnn_pkg::*;
#(
  parameter int N = N_IN
) (
  input  logic [SLOT_W-1:0] slot,
  input  cnn_val_t          wgt [N],
  output logic [N-1:0]      w_t,
  output logic [N-1:0]      sw_t
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [SLOTS-1:0] pat;
      pat     = wgt_pattern(wgt[i].mag);
      w_t[i]  = (slot < SLOT_W'(SLOTS)) ? pat[slot] : 1'b0;
      sw_t[i] = wgt[i].sign;
    end
  end

endmodule
