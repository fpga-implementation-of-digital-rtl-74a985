// cnn_converter: result register and value-to-interval converter of a cell.
//
// data_out holds the cell's current value; it loads d when ld is high (at the
// end of an iteration, or when new data is written) and resets to +0. In slot
// s (0..14) statex_o is high while s < |data_out|, so over an iteration the
// output is a single interval |data_out| slots long starting at slot 0;
// sign_o is the value's sign. Both are combinational in slot and the
// register. The register and the two outputs follow the published cell; the
// interval starting at the first slot follows the multiplication example.
module cnn_converter
  import cnn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld,
  input  cnn_val_t          d,
  input  logic [SLOT_W-1:0] slot,
  output cnn_val_t          data_out,
  output logic              statex_o,
  output logic              sign_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  data_out <= '0;
    else if (ld) data_out <= d;
  end

  assign statex_o = slot < SLOT_W'(data_out.mag);
  assign sign_o   = data_out.sign;

endmodule
