// tb_cnn_top: end-to-end test of the whole network at its default size
// (4x4 cells, 15 slots, saturating-linear transfer function).
//
// 1. Worked example: only the self weight 9/15 and every pixel 8/15 must give
//    5/15 after one iteration and 3/15 after the second.
// 2. Random templates, images and fixed boundary values, several iterations
//    each, compared pixel by pixel with the reference model; some runs drop
//    run at random (pauses) and some reload the image in the middle of an
//    iteration.
// Also checks the slot output, iter_done, iter_cnt and that one iteration
// takes 15 clocks of run. It counts the mechanisms of the design (load of
// new data, reload mid-iteration, pause, negative products counting down,
// saturation at +1 and -1, non-zero boundary input, edge output activity)
// and counts a failure for any that never happened.
module tb_cnn_top;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;
  localparam int R = 4, C = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 1, load = 0, run = 0;
  cnn_val_t wgt [9];
  cnn_val_t data_in [R][C];
  cnn_val_t data_out [R][C];
  tsig_t n_in [C+2], s_in [C+2], w_in [R], e_in [R];
  tsig_t n_out [C], s_out [C], w_out [R], e_out [R];
  logic [3:0] slot;
  logic iter_done;
  logic [15:0] iter_cnt;
  int checks = 0, failures = 0;

  cnn_val_t bn [C+2], bs [C+2], bw [R], be [R];
  cnn_val_t img [R][C];
  int t = 0;     // testbench's own slot count
  int iters = 0; // iterations since the last load

  int n_load = 0, n_midload = 0, n_pause = 0, n_down = 0, n_satp = 0,
      n_satn = 0, n_bound = 0, n_edge = 0, n_iter = 0;

  function automatic tsig_t enc(input cnn_val_t v, input int tt);
    tsig_t s;
    s.state = ref_xbit(int'(v.mag), tt);
    s.sign  = v.sign;
    return s;
  endfunction

  always_comb begin
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

  cnn_top dut (
    .clk(clk), .rst_n(rst_n), .load(load), .run(run), .wgt(wgt),
    .data_in(data_in), .data_out(data_out),
    .n_in(n_in), .s_in(s_in), .w_in(w_in), .e_in(e_in),
    .n_out(n_out), .s_out(s_out), .w_out(w_out), .e_out(e_out),
    .slot(slot), .iter_done(iter_done), .iter_cnt(iter_cnt));

  function automatic cnn_val_t at(input int r, input int c);
    if (r < 0)  return bn[c + 1];
    if (r >= R) return bs[c + 1];
    if (c < 0)  return bw[r];
    if (c >= C) return be[r];
    return img[r][c];
  endfunction

  task automatic ref_step();
    cnn_val_t nxt [R][C];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int net = 0;
        for (int k = 0; k < 9; k++) begin
          int rr = r - 1 + k / 3, cc = c - 1 + k % 3;
          int term = ref_term(at(rr, cc), wgt[k]);
          if (term < 0) n_down++;
          if (term != 0 && (rr < 0 || rr >= R || cc < 0 || cc >= C)) n_bound++;
          net += term;
        end
        if (net > 15) n_satp++;
        if (net < -15) n_satn++;
        nxt[r][c] = ref_f(net, 1'b0);
      end
    img = nxt;
  endtask

  task automatic compare(input string what);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        checks++;
        if (data_out[r][c] !== img[r][c]) begin
          failures++;
          $display("FAIL %s cell (%0d,%0d): got %b/%0d expected %b/%0d", what, r, c,
                   data_out[r][c].sign, data_out[r][c].mag, img[r][c].sign, img[r][c].mag);
        end
      end
  endtask

  task automatic do_load();
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) data_in[r][c] = img[r][c];
    @(negedge clk);
    load = 1;
    run  = 1;
    #1;
    checks++;
    if (iter_done !== 1'b0) failures++;
    @(posedge clk);
    #1;
    load = 0;
    t = 0;
    iters = 0;
    n_load++;
    compare("load");
    checks += 2;
    if (slot !== 4'd0) failures++;
    if (iter_cnt !== 16'd0) failures++;
  endtask

  // run n iterations; pause_pct: chance of run low per clock
  task automatic run_iters(input int n, input int pause_pct);
    int done = 0, cyc = 0;
    while (done < n) begin
      bit fin;
      @(negedge clk);
      run = ($urandom % 100) >= pause_pct;
      if (!run) n_pause++;
      #1;
      checks += 2;
      if (int'(slot) != t) begin
        failures++;
        $display("FAIL slot %0d expected %0d", slot, t);
      end
      fin = run && (t == 14);
      if (iter_done !== fin) failures++;
      for (int c = 0; c < C; c++) if (n_out[c].state || s_out[c].state) n_edge++;
      @(posedge clk);
      #1;
      if (run) begin
        cyc++;
        t = (t == 14) ? 0 : t + 1;
      end
      if (fin) begin
        ref_step();
        done++;
        iters++;
        n_iter++;
        compare("iteration");
        checks += 2;
        if (cyc != 15) begin
          failures++;
          $display("FAIL iteration took %0d clocks of run", cyc);
        end
        if (int'(iter_cnt) != iters) failures++;
        cyc = 0;
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int k = 0; k < 9; k++) wgt[k] = '0;
    for (int c = 0; c < C + 2; c++) begin bn[c] = '0; bs[c] = '0; end
    for (int r = 0; r < R; r++) begin bw[r] = '0; be[r] = '0; end
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      img[r][c] = '{1'b0, 4'd8};
      data_in[r][c] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. worked example, checked against hand-computed values
    wgt[4] = '{1'b0, 4'd9};
    do_load();
    for (int i = 0; i < 2; i++) begin
      automatic int cyc = 0;
      do begin
        @(negedge clk);
        run = 1;
        @(posedge clk);
        #1;
        cyc++;
        t = (t == 14) ? 0 : t + 1;
      end while (t != 0);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          checks++;
          if (data_out[r][c] !== cnn_val_t'({1'b0, i == 0 ? 4'd5 : 4'd3})) begin
            failures++;
            $display("FAIL example iteration %0d cell (%0d,%0d) = %0d", i, r, c, data_out[r][c].mag);
          end
        end
    end

    // 2. random templates, images and boundaries
    for (int test = 0; test < 24; test++) begin
      for (int k = 0; k < 9; k++) wgt[k] = rand_val();
      if (test % 3 == 0) begin
        // mostly-positive centre, small neighbours: slowly settling images
        wgt[4] = '{1'b0, 4'd15};
        for (int k = 0; k < 9; k++) if (k != 4) wgt[k].mag = 4'($urandom % 3);
      end
      for (int c = 0; c < C + 2; c++) begin bn[c] = rand_val(); bs[c] = rand_val(); end
      for (int r = 0; r < R; r++) begin bw[r] = rand_val(); be[r] = rand_val(); end
      if (test % 4 == 1) begin
        for (int c = 0; c < C + 2; c++) begin bn[c] = '0; bs[c] = '0; end
        for (int r = 0; r < R; r++) begin bw[r] = '0; be[r] = '0; end
      end
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) img[r][c] = rand_val();
      do_load();
      run_iters(6, (test % 2) ? 20 : 0);
      if (test % 5 == 2) begin
        // stop part-way through an iteration and load a new image
        repeat (1 + $urandom % 13) begin
          @(negedge clk) run = 1;
          @(posedge clk) #1 t++;
        end
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) img[r][c] = rand_val();
        do_load();
        n_midload++;
        run_iters(3, 0);
      end
    end

    $display("mechanisms: load=%0d midload=%0d pause=%0d down=%0d sat+=%0d sat-=%0d boundary=%0d edge=%0d iterations=%0d",
             n_load, n_midload, n_pause, n_down, n_satp, n_satn, n_bound, n_edge, n_iter);
    checks += 9;
    if (n_load == 0)    failures++;
    if (n_midload == 0) failures++;
    if (n_pause == 0)   failures++;
    if (n_down == 0)    failures++;
    if (n_satp == 0)    failures++;
    if (n_satn == 0)    failures++;
    if (n_bound == 0)   failures++;
    if (n_edge == 0)    failures++;
    if (n_iter == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
