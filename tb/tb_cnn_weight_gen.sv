// tb_cnn_weight_gen: checks every weight magnitude in every input position
// and every slot against the slot lists of the reference model, checks that
// each pattern has exactly k high slots, that signs pass through, and the
// worked example 9/15 * 8/15 -> 5/15.
module tb_cnn_weight_gen;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] slot;
  cnn_val_t   wgt [9];
  logic [8:0] w_t, sw_t;
  int checks = 0, failures = 0;

  cnn_weight_gen dut (.slot(slot), .wgt(wgt), .w_t(w_t), .sw_t(sw_t));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones [9];
    int y;
    ref_init();
    for (int rot = 0; rot < 16; rot++) begin
      // position i gets magnitude (i + rot) % 16, random sign
      for (int i = 0; i < 9; i++) begin
        wgt[i].mag  = 4'((i + rot) % 16);
        wgt[i].sign = 1'($urandom);
        ones[i] = 0;
      end
      for (int t = 0; t < 15; t++) begin
        slot = 4'(t);
        #1;
        for (int i = 0; i < 9; i++) begin
          checks++;
          if (w_t[i] !== ref_wbit(int'(wgt[i].mag), t)) begin
            failures++;
            $display("FAIL w=%0d slot=%0d pos=%0d got %b", wgt[i].mag, t + 1, i, w_t[i]);
          end
          checks++;
          if (sw_t[i] !== wgt[i].sign) failures++;
          ones[i] += int'(w_t[i]);
        end
      end
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (ones[i] != int'(wgt[i].mag)) begin
          failures++;
          $display("FAIL w=%0d has %0d high slots", wgt[i].mag, ones[i]);
        end
      end
    end
    // worked example: weight 9/15, input 8/15 (high in slots 1..8) -> 5/15
    wgt[0] = '{sign: 1'b0, mag: 4'd9};
    y = 0;
    for (int t = 0; t < 15; t++) begin
      slot = 4'(t);
      #1;
      if (t < 8 && w_t[0]) y++;
    end
    checks++;
    if (y != 5) begin
      failures++;
      $display("FAIL example product %0d/15, expected 5/15", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
