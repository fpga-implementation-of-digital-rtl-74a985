// cnn_array: ROWS x COLS grid of cells with nearest-neighbour coupling.
//
// Cell inputs are numbered as a 3x3 window: 1 2 3 on the row above, 4 5 6 on
// the cell's own row (5 is the cell itself), 7 8 9 on the row below. Input k
// of cell (r,c) (index k-1 in the vectors) is the time-coded output of the
// cell at (r-1+(k-1)/3, c-1+(k-1)%3). Outside the grid the inputs come from
// ports, so arrays can be tiled into a larger network: n_in/s_in carry the
// row above/below including both corners (index 0 is column -1, index COLS+1
// is column COLS), w_in/e_in the columns left/right. The edge cells' outputs
// leave on n_out, s_out, w_out and e_out. A lone array gets a fixed boundary
// by tying the inputs to a constant value (for example 0).
//
// Per-cell new data enters on data_in while load is high; data_out is each
// cell's register. The coupling and the numbering follow the published
// connection diagram (4x4 cells); the edge ports are this design's way of
// making the array cascadable.
module cnn_array
  import cnn_pkg::*;
#(
  parameter int       ROWS = 4,
  parameter int       COLS = 4,
  parameter tf_mode_e TF   = TF_SATLIN
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              en,
  input  logic              last,
  input  logic [SLOT_W-1:0] slot,
  input  logic [N_IN-1:0]   w_t,
  input  logic [N_IN-1:0]   sw_t,
  input  cnn_val_t          data_in  [ROWS][COLS],
  output cnn_val_t          data_out [ROWS][COLS],
  input  tsig_t             n_in [COLS+2],
  input  tsig_t             s_in [COLS+2],
  input  tsig_t             w_in [ROWS],
  input  tsig_t             e_in [ROWS],
  output tsig_t             n_out [COLS],
  output tsig_t             s_out [COLS],
  output tsig_t             w_out [ROWS],
  output tsig_t             e_out [ROWS]
);

  // cell outputs, and the same grid with a one-cell halo of boundary inputs
  tsig_t cell_o [ROWS][COLS];
  tsig_t halo   [ROWS+2][COLS+2];

  always_comb begin
    for (int c = 0; c < COLS + 2; c++) begin
      halo[0][c]      = n_in[c];
      halo[ROWS+1][c] = s_in[c];
    end
    for (int r = 0; r < ROWS; r++) begin
      halo[r+1][0]      = w_in[r];
      halo[r+1][COLS+1] = e_in[r];
      for (int c = 0; c < COLS; c++) halo[r+1][c+1] = cell_o[r][c];
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [N_IN-1:0] in_t, sin;

      for (genvar k = 0; k < N_IN; k++) begin : g_in
        assign in_t[k] = halo[r + k/3][c + k%3].state;
        assign sin[k]  = halo[r + k/3][c + k%3].sign;
      end

      cnn_cell #(.N(N_IN), .TF(TF)) u_cell (
        .clk(clk), .rst_n(rst_n), .load(load), .en(en), .last(last),
        .slot(slot), .in_t(in_t), .sin(sin), .w_t(w_t), .sw_t(sw_t),
        .new_data(data_in[r][c]), .data_out(data_out[r][c]),
        .statex_o(cell_o[r][c].state), .sign_o(cell_o[r][c].sign)
      );
    end
  end

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      n_out[c] = cell_o[0][c];
      s_out[c] = cell_o[ROWS-1][c];
    end
    for (int r = 0; r < ROWS; r++) begin
      w_out[r] = cell_o[r][0];
      e_out[r] = cell_o[r][COLS-1];
    end
  end

endmodule
