// tb_cnn_counter: feeds random product streams for whole 15-slot iterations,
// with random enable gaps, and checks the running sum every slot, the final
// Net at the last slot, the restart after it and the clear input.
module tb_cnn_counter;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 1, clr = 0, en = 0, last = 0;
  logic [8:0] hit = '0, neg = '0;
  logic signed [8:0] acc, net;
  int checks = 0, failures = 0;

  // drive a real falling edge so the asynchronous reset takes effect
  initial #1 rst_n = 0;

  cnn_counter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .last(last),
                   .hit(hit), .neg(neg), .acc(acc), .net(net));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    int n_sat_range = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (acc !== 0) failures++;
    model = 0;
    for (int it = 0; it < 60; it++) begin
      automatic int t = 0;
      // bias some iterations to the extremes to reach |Net| = 135
      automatic int mode = it % 4;
      while (t < 15) begin
        automatic int d = 0;
        @(negedge clk);
        en   = ($urandom % 4) != 0;
        last = (t == 14);
        hit  = mode == 1 ? 9'h1FF : 9'($urandom);
        neg  = mode == 1 ? 9'h000 : (mode == 2 ? 9'h1FF : 9'($urandom));
        for (int i = 0; i < 9; i++) if (hit[i]) d += neg[i] ? -1 : 1;
        #1;
        checks++;
        if (int'(net) != model + d) begin
          failures++;
          $display("FAIL it=%0d t=%0d net=%0d expected %0d", it, t, net, model + d);
        end
        @(posedge clk);
        #1;
        if (en) begin
          if (t == 14) begin
            if (model + d == 135 || model + d == -135) n_sat_range++;
            model = 0;
          end else model += d;
          t++;
        end
        checks++;
        if (int'(acc) != model) begin
          failures++;
          $display("FAIL it=%0d acc=%0d expected %0d", it, acc, model);
        end
      end
      // clear in the middle of a partial iteration
      if (it % 5 == 3) begin
        @(negedge clk);
        en = 1; last = 0; hit = 9'h1FF; neg = '0;
        @(negedge clk);
        clr = 1;
        @(negedge clk);
        clr = 0; en = 0;
        checks++;
        if (acc !== 0) failures++;
      end
    end
    checks++;
    if (n_sat_range == 0) begin
      failures++;
      $display("FAIL full-scale Net never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
