// tb_cnn_array: a non-square 3x5 grid driven by a testbench slot sequencer
// and weight code. Random templates, images and boundary values; every
// iteration's image is compared with the reference model, and the edge
// outputs are checked slot by slot against the edge cells' values. The grid
// is non-square so that a swapped row/column index shows up. A second grid
// with the hard-limiter transfer function runs on the same inputs and is
// checked against its own reference image.
module tb_cnn_array;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;
  localparam int R = 3, C = 5;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 1, load = 0, en = 0, last;
  logic [3:0] slot;
  logic [8:0] w_t, sw_t;
  cnn_val_t data_in [R][C];
  cnn_val_t data_out [R][C];
  tsig_t n_in [C+2], s_in [C+2], w_in [R], e_in [R];
  tsig_t n_out [C], s_out [C], w_out [R], e_out [R];
  cnn_val_t data_out_h [R][C];
  tsig_t n_out_h [C], s_out_h [C], w_out_h [R], e_out_h [R];
  int checks = 0, failures = 0;

  cnn_val_t wgt [9];
  cnn_val_t bn [C+2], bs [C+2], bw [R], be [R];
  cnn_val_t img [R][C];
  cnn_val_t img_h [R][C];
  int t = 0;

  function automatic tsig_t enc(input cnn_val_t v, input int tt);
    tsig_t s;
    s.state = ref_xbit(int'(v.mag), tt);
    s.sign  = v.sign;
    return s;
  endfunction

  assign slot = 4'(t);
  assign last = (t == 14);
  always_comb begin
    for (int k = 0; k < 9; k++) begin
      w_t[k]  = ref_wbit(int'(wgt[k].mag), t);
      sw_t[k] = wgt[k].sign;
    end
    for (int c = 0; c < C + 2; c++) begin
      n_in[c] = enc(bn[c], t);
      s_in[c] = enc(bs[c], t);
    end
    for (int r = 0; r < R; r++) begin
      w_in[r] = enc(bw[r], t);
      e_in[r] = enc(be[r], t);
    end
  end

  // drive a real falling edge so the asynchronous reset takes effect
  initial #1 rst_n = 0;

  cnn_array #(.ROWS(R), .COLS(C)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .last(last), .slot(slot),
    .w_t(w_t), .sw_t(sw_t), .data_in(data_in), .data_out(data_out),
    .n_in(n_in), .s_in(s_in), .w_in(w_in), .e_in(e_in),
    .n_out(n_out), .s_out(s_out), .w_out(w_out), .e_out(e_out));

  cnn_array #(.ROWS(R), .COLS(C), .TF(TF_HARDLIM)) dut_h (
    .clk(clk), .rst_n(rst_n), .load(load), .en(en), .last(last), .slot(slot),
    .w_t(w_t), .sw_t(sw_t), .data_in(data_in), .data_out(data_out_h),
    .n_in(n_in), .s_in(s_in), .w_in(w_in), .e_in(e_in),
    .n_out(n_out_h), .s_out(s_out_h), .w_out(w_out_h), .e_out(e_out_h));

  // value at grid position (r, c), -1..R and -1..C, boundary included
  // value at grid position (r, c) of the linear (h = 0) or hard-limiter grid
  function automatic cnn_val_t at(input bit h, input int r, input int c);
    if (r < 0)  return bn[c + 1];
    if (r >= R) return bs[c + 1];
    if (c < 0)  return bw[r];
    if (c >= C) return be[r];
    return h ? img_h[r][c] : img[r][c];
  endfunction

  task automatic ref_step();
    cnn_val_t nxt [R][C];
    cnn_val_t nxt_h [R][C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int net = 0, net_h = 0;
        for (int k = 0; k < 9; k++) begin
          net   += ref_term(at(1'b0, r - 1 + k / 3, c - 1 + k % 3), wgt[k]);
          net_h += ref_term(at(1'b1, r - 1 + k / 3, c - 1 + k % 3), wgt[k]);
        end
        nxt[r][c]   = ref_f(net, 1'b0);
        nxt_h[r][c] = ref_f(net_h, 1'b1);
      end
    img   = nxt;
    img_h = nxt_h;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int k = 0; k < 9; k++) wgt[k] = '0;
    for (int c = 0; c < C + 2; c++) begin bn[c] = '0; bs[c] = '0; end
    for (int r = 0; r < R; r++) begin bw[r] = '0; be[r] = '0; end
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) data_in[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int test = 0; test < 12; test++) begin
      // half of the templates use a single neighbour so that a wrong
      // neighbour index cannot hide in a saturated sum
      for (int k = 0; k < 9; k++) wgt[k] = rand_val();
      if (test % 2 == 0) begin
        automatic int only = test / 2 % 9;
        for (int k = 0; k < 9; k++) if (k != only) wgt[k] = '0;
      end
      for (int c = 0; c < C + 2; c++) begin bn[c] = rand_val(); bs[c] = rand_val(); end
      for (int r = 0; r < R; r++) begin bw[r] = rand_val(); be[r] = rand_val(); end
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          img[r][c] = rand_val();
          img_h[r][c] = img[r][c];
          data_in[r][c] = img[r][c];
        end
      @(negedge clk);
      load = 1;
      @(posedge clk);
      #1;
      load = 0;
      t = 0;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          checks += 2;
          if (data_out[r][c] !== img[r][c]) failures++;
          if (data_out_h[r][c] !== img_h[r][c]) failures++;
        end
      for (int it = 0; it < 5; it++) begin
        for (int s = 0; s < 15; s++) begin
          @(negedge clk);
          en = 1;
          // edge outputs carry the edge cells' current values as intervals
          for (int c = 0; c < C; c++) begin
            checks += 2;
            if (n_out[c] !== enc(img[0][c], t)) failures++;
            if (s_out[c] !== enc(img[R-1][c], t)) failures++;
          end
          for (int r = 0; r < R; r++) begin
            checks += 2;
            if (w_out[r] !== enc(img[r][0], t)) failures++;
            if (e_out[r] !== enc(img[r][C-1], t)) failures++;
          end
          @(posedge clk);
          #1;
          t = (t == 14) ? 0 : t + 1;
        end
        ref_step();
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            checks++;
            if (data_out[r][c] !== img[r][c]) begin
              failures++;
              $display("FAIL test %0d it %0d cell (%0d,%0d): got %b/%0d expected %b/%0d",
                       test, it, r, c, data_out[r][c].sign, data_out[r][c].mag,
                       img[r][c].sign, img[r][c].mag);
            end
            checks++;
            if (data_out_h[r][c] !== img_h[r][c]) begin
              failures++;
              $display("FAIL hard-limiter test %0d it %0d cell (%0d,%0d): got %b/%0d expected %b/%0d",
                       test, it, r, c, data_out_h[r][c].sign, data_out_h[r][c].mag,
                       img_h[r][c].sign, img_h[r][c].mag);
            end
          end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
