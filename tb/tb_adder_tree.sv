// tb_adder_tree: phase-2 adder tree against sums computed in the bench,
// for the 72-input tree of a convolution engine and a 5-input tree (a size
// that is not a power of two), with random signed products.
module tb_adder_tree;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic signed [71:0][31:0] x72;
  logic signed [4:0][31:0]  x5;
  logic signed [47:0] s72, s5;
  adder_tree #(.N(72), .IW(32), .OW(48)) dut72 (.clk, .en, .x(x72), .sum(s72));
  adder_tree #(.N(5),  .IW(32), .OW(48)) dut5  (.clk, .en, .x(x5),  .sum(s5));
  int checks = 0, failures = 0;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    longint e72, e5;
    for (int t = 0; t < 300; t++) begin
      e72 = 0; e5 = 0;
      for (int i = 0; i < 72; i++) begin
        x72[i] = (t == 0) ? 32'sh8000_0000 : $signed($urandom);
        e72 += longint'($signed(x72[i]));
      end
      for (int i = 0; i < 5; i++) begin
        x5[i] = $signed($urandom) >>> (t % 20);
        e5 += longint'($signed(x5[i]));
      end
      en = 1;
      @(posedge clk); #1;
      checks += 2;
      if (s72 !== 48'(e72)) begin failures++; $display("FAIL 72: got %0d exp %0d", s72, e72); end
      if (s5  !== 48'(e5))  begin failures++; $display("FAIL 5: got %0d exp %0d", s5, e5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
