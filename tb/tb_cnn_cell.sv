// tb_cnn_cell: one cell with input 5 tied to its own output, as in the array.
// The other eight inputs and the nine weights are random values, time-coded
// by the testbench. Checks the mx path (load of new data, also in the middle
// of an iteration), each iteration's result against the reference model,
// that the result changes only at the end of an iteration, and that an
// iteration takes 15 enabled clocks.
module tb_cnn_cell;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 1, load = 0, en = 0, last;
  logic [3:0] slot;
  logic [8:0] in_t, sin, w_t, sw_t;
  cnn_val_t new_data, data_out;
  logic statex_o, sign_o;
  int checks = 0, failures = 0;

  cnn_val_t x [9];
  cnn_val_t w [9];
  int t = 0;

  assign slot = 4'(t);
  assign last = (t == 14);

  always_comb begin
    for (int k = 0; k < 9; k++) begin
      w_t[k]  = ref_wbit(int'(w[k].mag), t);
      sw_t[k] = w[k].sign;
      if (k == 4) begin
        in_t[k] = statex_o;
        sin[k]  = sign_o;
      end else begin
        in_t[k] = ref_xbit(int'(x[k].mag), t);
        sin[k]  = x[k].sign;
      end
    end
  end

  // drive a real falling edge so the asynchronous reset takes effect
  initial #1 rst_n = 0;

  cnn_cell dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .last(last),
                .slot(slot), .in_t(in_t), .sin(sin), .w_t(w_t), .sw_t(sw_t),
                .new_data(new_data), .data_out(data_out),
                .statex_o(statex_o), .sign_o(sign_o));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_load(input cnn_val_t v);
    @(negedge clk);
    new_data = v;
    load = 1;
    en = 0;
    @(posedge clk);
    #1;
    load = 0;
    t = 0;
    checks++;
    if (data_out !== v) begin
      failures++;
      $display("FAIL load: got %b expected %b", data_out, v);
    end
  endtask

  initial begin
    cnn_val_t cur, exp_y;
    int n_mid_load = 0, n_iter = 0;
    ref_init();
    for (int k = 0; k < 9; k++) begin x[k] = '0; w[k] = '0; end
    new_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // worked example: only the self weight 9/15, own value 8/15 -> 5/15 -> 3/15
    w[4] = '{sign: 1'b0, mag: 4'd9};
    do_load('{sign: 1'b0, mag: 4'd8});
    for (int i = 0; i < 2; i++) begin
      repeat (15) begin
        @(negedge clk) en = 1;
        @(posedge clk) #1 t = (t == 14) ? 0 : t + 1;
      end
      checks++;
      exp_y.sign = 1'b0;
      exp_y.mag  = (i == 0) ? 4'd5 : 4'd3;
      if (data_out !== exp_y) begin
        failures++;
        $display("FAIL example iteration %0d: got %0d", i, data_out.mag);
      end
    end
    for (int run = 0; run < 40; run++) begin
      for (int k = 0; k < 9; k++) begin x[k] = rand_val(); w[k] = rand_val(); end
      do_load(rand_val());
      for (int it = 0; it < 4; it++) begin
        automatic int net = 0, ens = 0;
        cur = data_out;
        for (int k = 0; k < 9; k++) net += ref_term(k == 4 ? cur : x[k], w[k]);
        exp_y = ref_f(net, 1'b0);
        while (1) begin
          bit fin;
          @(negedge clk);
          en = ($urandom % 3) != 0;
          fin = en && (t == 14);
          @(posedge clk);
          #1;
          if (en) begin ens++; t = (t == 14) ? 0 : t + 1; end
          if (fin) break;
          checks++;
          if (data_out !== cur) failures++;   // no change mid-iteration
        end
        n_iter++;
        checks += 2;
        if (ens != 15) failures++;
        if (data_out !== exp_y) begin
          failures++;
          $display("FAIL run %0d it %0d: got %b/%0d expected %b/%0d (net %0d)",
                   run, it, data_out.sign, data_out.mag, exp_y.sign, exp_y.mag, net);
        end
      end
      // reload in the middle of an iteration: the partial sum must be dropped
      if (run % 4 == 1) begin
        repeat (7) begin
          @(negedge clk) en = 1;
          @(posedge clk) #1 t = (t == 14) ? 0 : t + 1;
        end
        n_mid_load++;
      end
    end
    checks++;
    if (n_mid_load == 0 || n_iter == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
