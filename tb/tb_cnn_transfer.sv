// tb_cnn_transfer: sweeps Net over its whole range (-135..135 and beyond to
// the 9-bit limits) for both transfer curves.
module tb_cnn_transfer;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [8:0] net;
  cnn_val_t y_lin, y_hard;
  int checks = 0, failures = 0;

  cnn_transfer #(.TF(TF_SATLIN))  u_lin  (.net(net), .y(y_lin));
  cnn_transfer #(.TF(TF_HARDLIM)) u_hard (.net(net), .y(y_hard));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = -256; n <= 255; n++) begin
      int em;
      bit es;
      net = 9'(n);
      #1;
      // saturating linear: value n/15 clamped to [-1, 1]
      es = n < 0;
      em = n > 15 ? 15 : (n < -15 ? 15 : (n < 0 ? -n : n));
      checks++;
      if (y_lin.sign !== es || int'(y_lin.mag) != em) begin
        failures++;
        $display("FAIL satlin net=%0d got %b/%0d", n, y_lin.sign, y_lin.mag);
      end
      checks++;
      if (y_hard.sign !== (n < 0) || y_hard.mag !== 4'd15) begin
        failures++;
        $display("FAIL hardlim net=%0d got %b/%0d", n, y_hard.sign, y_hard.mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
