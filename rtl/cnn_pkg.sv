// cnn_pkg: types, sizes and the time-code table shared by the digital CNN.
//
// The network works on 5-bit sign-magnitude values k/15, k = 0..15, so a cell
// value lies in -1..+1 in steps of 1/15 (31 distinct levels). An iteration is
// split into SLOTS = 15 clock slots. A weight of magnitude k is sent as a
// 15-slot pattern with exactly k high slots (wgt_pattern); an input of
// magnitude k is sent as an interval that is high for the first k slots.
// ANDing the two and counting the high slots gives the product, rounded, in
// units of 1/15.
//
// The slot count, the 5-bit format, the 9 inputs per cell, the 9-bit counter
// and the patterns of wgt_pattern follow the published design. Bit s-1 of a
// pattern is slot s of the drawing. The transfer-function choice enum is this
// design's own addition.
package cnn_pkg;

  localparam int SLOTS  = 15;  // clock slots per iteration
  localparam int MAG_W  = 4;   // magnitude bits (0..15)
  localparam int SLOT_W = 4;   // width of the slot counter (0..14)
  localparam int N_IN   = 9;   // inputs per cell: 3x3 neighbourhood
  localparam int ACC_W  = 9;   // counter width: |Net| <= 9*15 = 135

  // 5-bit sign-magnitude cell value: value = (sign ? -1 : +1) * mag / 15
  typedef struct packed {
    logic             sign;
    logic [MAG_W-1:0] mag;
  } cnn_val_t;

  // One time-coded signal between cells: interval bit and its sign
  typedef struct packed {
    logic sign;
    logic state;
  } tsig_t;

  typedef enum logic {
    TF_SATLIN  = 1'b0,  // piecewise-linear saturation to -1..+1
    TF_HARDLIM = 1'b1   // hard limiter: +1 for Net >= 0, -1 otherwise
  } tf_mode_e;

  // Time pattern of a weight of magnitude m/15. Patterns for m >= 8 are the
  // complement of the pattern for 15-m.
  function automatic logic [SLOTS-1:0] wgt_pattern(input logic [MAG_W-1:0] m);
    unique case (m)
      4'd0:  return 15'h0000;
      4'd1:  return 15'h0080;
      4'd2:  return 15'h0808;
      4'd3:  return 15'h1084;
      4'd4:  return 15'h2222;
      4'd5:  return 15'h2492;
      4'd6:  return 15'h294A;
      4'd7:  return 15'h2AAA;
      4'd8:  return 15'h5555;
      4'd9:  return 15'h56B5;
      4'd10: return 15'h5B6D;
      4'd11: return 15'h5DDD;
      4'd12: return 15'h6F7B;
      4'd13: return 15'h77F7;
      4'd14: return 15'h7F7F;
      default: return 15'h7FFF;
    endcase
  endfunction

endpackage
