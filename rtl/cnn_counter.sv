// cnn_counter: up/down counter that sums the products of one iteration.
//
// Every enabled slot it adds +1 for each hit whose sign is positive and -1
// for each hit whose sign is negative, so after 15 slots it holds
// Net = sum_i x_i*w_i in units of 1/15 (|Net| <= N*15, ACC_W bits signed).
// net is the running sum including the current slot's products
// (combinational); on the last slot the cell registers f(net) and the counter
// restarts from zero, so iterations follow each other with no idle cycle.
// clr (new data loaded) also restarts it. Reset is asynchronous, active low.
//
// The counter and its 9-bit width follow the published cell; counting all N
// products in one slot (several steps per clock) is how this design reaches
// one iteration per 15 clocks.
module cnn_counter
  import cnn_pkg::*;
#(
  parameter int N = N_IN,
  parameter int W = ACC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic                last,
  input  logic [N-1:0]        hit,
  input  logic [N-1:0]        neg,
  output logic signed [W-1:0] acc,
  output logic signed [W-1:0] net
);

  logic signed [W-1:0] delta;

  always_comb begin
    delta = '0;
    for (int i = 0; i < N; i++)
      if (hit[i]) delta = neg[i] ? delta - W'(1) : delta + W'(1);
    net = acc + delta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc <= '0;
    else if (clr)     acc <= '0;
    else if (en)      acc <= last ? '0 : net;
  end

endmodule
