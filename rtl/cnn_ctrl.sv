// cnn_ctrl: common slot sequencer of the network.
//
// All cells and the weight generator share one slot count 0..SLOTS-1. While
// run is high (and load low) the count advances every clock and wraps after
// slot SLOTS-1, which is flagged by last; iter_done pulses in that cycle and
// iter_cnt counts completed iterations. load restarts the count at slot 0 and
// clears iter_cnt; run low freezes the network in its current slot.
// en = run & ~load is the advance enable for the cells.
//
// The 15 slots per iteration follow the published design; the run/load
// protocol, the iteration counter and its width are this design's choice.
// Reset is asynchronous, active low.
module cnn_ctrl
  import cnn_pkg::*;
#(
  parameter int ITER_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              run,
  output logic [SLOT_W-1:0] slot,
  output logic              en,
  output logic              last,
  output logic              iter_done,
  output logic [ITER_W-1:0] iter_cnt
);

  assign en        = run & ~load;
  assign last      = slot == SLOT_W'(SLOTS - 1);
  assign iter_done = en & last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot     <= '0;
      iter_cnt <= '0;
    end else if (load) begin
      slot     <= '0;
      iter_cnt <= '0;
    end else if (en) begin
      slot <= last ? '0 : slot + SLOT_W'(1);
      if (last) iter_cnt <= iter_cnt + ITER_W'(1);
    end
  end

endmodule
