// tb_cnn_and_xor: random and exhaustive single-bit checks of the AND product
// and XOR sign of all nine multiplier gates.
module tb_cnn_and_xor;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0] in_t, sin, w_t, sw_t, hit, neg;
  int checks = 0, failures = 0;

  cnn_and_xor dut (.in_t(in_t), .sin(sin), .w_t(w_t), .sw_t(sw_t), .hit(hit), .neg(neg));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      in_t = 9'($urandom); sin = 9'($urandom); w_t = 9'($urandom); sw_t = 9'($urandom);
      #1;
      for (int i = 0; i < 9; i++) begin
        bit eh, en;
        eh = (in_t[i] == 1'b1) && (w_t[i] == 1'b1);
        en = (sin[i] != sw_t[i]);
        checks += 2;
        if (hit[i] !== eh) failures++;
        if (neg[i] !== en) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
