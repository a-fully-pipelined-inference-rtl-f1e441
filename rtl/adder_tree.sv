// adder_tree: phase 2 of a computation engine.
//
// Sums N signed IW-bit products in a balanced binary tree of N-1 adders
// (ceil(log2 N) levels) and registers the OW-bit total: sum is valid one cycle
// after x when en is high. The tree shape follows the design description; the
// single register stage at the output is this design's choice (the tree is
// combinational inside one cycle).
module adder_tree #(
  parameter int N  = 72,
  parameter int IW = 32,
  parameter int OW = 48
) (
  input  logic                        clk,
  input  logic                        en,
  input  logic signed [N-1:0][IW-1:0] x,
  output logic signed [OW-1:0]        sum
);
  localparam int LV = (N <= 1) ? 1 : $clog2(N);
  localparam int NP = 1 << LV;

  logic signed [OW-1:0] t [LV+1][NP];

  always_comb begin
    for (int i = 0; i < NP; i++) t[0][i] = (i < N) ? OW'($signed(x[i])) : '0;
    for (int l = 1; l <= LV; l++)
      for (int i = 0; i < NP; i++)
        t[l][i] = (i < (NP >> l)) ? t[l-1][2*i] + t[l-1][2*i+1] : '0;
  end

  always_ff @(posedge clk)
    if (en) sum <= t[LV][0];
endmodule
