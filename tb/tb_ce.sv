// tb_ce: computation engine on one image, in two configurations: a 3x3
// convolution with 2x2 max pooling (16 input channels, 8 per cycle, two
// kernel batches per row) and an output fully connected layer (64 inputs,
// 16 per cycle, label search). See ce_harness for what is checked.
module tb_ce;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fin0, fin1;
  int c0, f0, c1, f1;
  ce_harness #(.L(cnn_pkg::lc(16, 8, 6, 3, 8, 1'b1, 1'b0, 2, 1))) h_conv (
    .clk, .rst_n, .go(rst_n), .fin(fin0), .checks(c0), .failures(f0));
  ce_harness #(.L(cnn_pkg::lc(64, 10, 1, 1, 16, 1'b0, 1'b1, 2, 1))) h_fc (
    .clk, .rst_n, .go(rst_n), .fin(fin1), .checks(c1), .failures(f1));
  initial begin
    #400000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
  initial begin
    #32 rst_n = 1;
    wait (fin0 && fin1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
