// mult_array: phase 1 of a computation engine.
//
// N signed 16-bit multipliers working in parallel, one input feature times one
// weight each, with the products registered: p is valid one cycle after a/b
// when en is high (p holds while en is low). N is the number of multipliers of
// the engine (27 in the first engine, 72 in the other convolution engines and
// 64 in the fully connected ones). Full 32-bit products are kept; scaling back
// to 16 bits happens after accumulation (this design's choice).
module mult_array #(
  parameter int N = 72
) (
  input  logic                     clk,
  input  logic                     en,
  input  cnn_pkg::word_t [N-1:0]   a,
  input  cnn_pkg::word_t [N-1:0]   b,
  output logic signed [N-1:0][31:0] p
);
  always_ff @(posedge clk)
    if (en)
      for (int i = 0; i < N; i++) p[i] <= 32'($signed(a[i])) * 32'($signed(b[i]));
endmodule
