// tb_cnn_converter: loads every value, checks the register, that statex_o is
// one interval of |value| slots starting at the first slot, the sign output,
// that the register holds while ld is low, and the reset value.
module tb_cnn_converter;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 1, ld = 0;
  cnn_val_t d, data_out;
  logic [3:0] slot = '0;
  logic statex_o, sign_o;
  int checks = 0, failures = 0;

  // drive a real falling edge so the asynchronous reset takes effect
  initial #1 rst_n = 0;

  cnn_converter dut (.clk(clk), .rst_n(rst_n), .ld(ld), .d(d), .slot(slot),
                     .data_out(data_out), .statex_o(statex_o), .sign_o(sign_o));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #3;
    checks++;
    if (data_out !== '0 || statex_o !== 1'b0) failures++;
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < 32; v++) begin
      cnn_val_t other, vv;
      automatic int high = 0, first_low = 15;
      @(negedge clk);
      d = cnn_val_t'(v);
      ld = 1;
      @(negedge clk);
      ld = 0;
      other = cnn_val_t'(5'(v + 7));
      d = other;              // must not be taken while ld is low
      checks++;
      if (data_out !== cnn_val_t'(v)) failures++;
      for (int t = 0; t < 15; t++) begin
        slot = 4'(t);
        #1;
        if (statex_o) begin
          high++;
          checks++;
          if (first_low != 15) failures++;  // interval must be contiguous
        end else if (first_low == 15) first_low = t;
        checks++;
        vv = cnn_val_t'(v);
        if (sign_o !== vv.sign) failures++;
        @(negedge clk);
      end
      checks++;
      if (high != v % 16) begin
        failures++;
        $display("FAIL value %0d interval %0d slots", v, high);
      end
      checks++;
      if (data_out !== cnn_val_t'(v)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
