// tb_mult_array: phase-1 multipliers against products computed in the bench.
// Random signed operands, including the extreme values; checks the one-cycle
// latency and that the products hold while en is low.
module tb_mult_array;
  import cnn_pkg::*;
  localparam int N = 27;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  word_t [N-1:0] a, b;
  logic signed [N-1:0][31:0] p;
  mult_array #(.N(N)) dut (.clk, .en, .a, .b, .p);
  int checks = 0, failures = 0;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic signed [N-1:0][31:0] exp_p;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = (t == 0) ? 16'sh8000 : word_t'($urandom);
        b[i] = (t == 0) ? ((i % 2) ? 16'sh8000 : 16'sh7fff) : word_t'($urandom);
        exp_p[i] = 32'(longint'(a[i]) * longint'(b[i]));
      end
      en = 1;
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (p[i] !== exp_p[i]) begin failures++; $display("FAIL t=%0d i=%0d %0d*%0d got %0d", t, i, a[i], b[i], p[i]); end
      end
      en = 0; a = '0; b = '0;
      @(posedge clk); #1;
      checks++;
      if (p !== exp_p) begin failures++; $display("FAIL products not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
