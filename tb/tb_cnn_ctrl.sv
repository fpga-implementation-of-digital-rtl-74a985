// tb_cnn_ctrl: runs the sequencer with random run gaps and loads, comparing
// slot, last, iter_done and iter_cnt with a cycle model, and checks that
// iterations are exactly 15 enabled clocks.
module tb_cnn_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 1, load = 0, run = 0;
  logic [3:0] slot;
  logic en, last, iter_done;
  logic [15:0] iter_cnt;
  int checks = 0, failures = 0;

  // drive a real falling edge so the asynchronous reset takes effect
  initial #1 rst_n = 0;

  cnn_ctrl dut (.clk(clk), .rst_n(rst_n), .load(load), .run(run), .slot(slot),
                .en(en), .last(last), .iter_done(iter_done), .iter_cnt(iter_cnt));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mslot = 0, miter = 0, since = 0;
    int n_done = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      run  = ($urandom % 8) != 0;
      load = ($urandom % 300) == 0;
      #1;
      checks += 4;
      if (int'(slot) != mslot) begin failures++; $display("FAIL slot %0d exp %0d", slot, mslot); end
      if (en !== (run && !load)) failures++;
      if (last !== (mslot == 14)) failures++;
      if (iter_done !== (run && !load && mslot == 14)) failures++;
      @(posedge clk);
      #1;
      if (load) begin
        mslot = 0; miter = 0; since = 0;
      end else if (run) begin
        since++;
        if (mslot == 14) begin
          mslot = 0; miter++; n_done++;
          checks++;
          if (since != 15) failures++;
          since = 0;
        end else mslot++;
      end
      checks++;
      if (int'(iter_cnt) != miter) failures++;
    end
    checks++;
    if (n_done < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
