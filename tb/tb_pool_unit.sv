// tb_pool_unit: phase 4 in its three modes.
// Feeds random features in the engine's order (row, then channel, then
// column) with random idle cycles, into a pooling instance, a plain instance
// and an output-layer instance. Checks every FLM write (address and value)
// against 2x2 max pooling / direct placement computed in the bench, the
// write latency of one cycle, and the label and score of the output layer
// (ties included: the first maximum wins).
module tb_pool_unit;
  import cnn_pkg::*;
  localparam int D = 3, W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [15:0] in_d, in_u, in_v;
  word_t in_x;
  logic we_p, we_n, we_l, rv_p, rv_n, rv_l;
  logic [4:0] wa_p; logic [5:0] wa_n; logic [1:0] wa_l;
  word_t wd_p, wd_n, wd_l, rs_p, rs_n, rs_l;
  logic [1:0] rc_p, rc_n; logic [2:0] rc_l;
  pool_unit #(.D(D), .W(W), .POOL(1), .LAST(0)) dut_p (.clk, .rst_n, .in_valid, .in_d, .in_u, .in_v, .in_x,
    .we(we_p), .waddr(wa_p), .wdata(wd_p), .res_valid(rv_p), .res_class(rc_p), .res_score(rs_p));
  pool_unit #(.D(D), .W(W), .POOL(0), .LAST(0)) dut_n (.clk, .rst_n, .in_valid, .in_d, .in_u, .in_v, .in_x,
    .we(we_n), .waddr(wa_n), .wdata(wd_n), .res_valid(rv_n), .res_class(rc_n), .res_score(rs_n));
  logic in_valid_l = 0; logic [15:0] in_d_l; word_t in_x_l;
  pool_unit #(.D(5), .W(1), .POOL(0), .LAST(1)) dut_l (.clk, .rst_n, .in_valid(in_valid_l), .in_d(in_d_l),
    .in_u(16'd0), .in_v(16'd0), .in_x(in_x_l),
    .we(we_l), .waddr(wa_l), .wdata(wd_l), .res_valid(rv_l), .res_class(rc_l), .res_score(rs_l));

  int checks = 0, failures = 0, nw_p = 0, nw_n = 0;
  word_t x [D][W][W];
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // scoreboard of writes
  always @(posedge clk) if (rst_n) begin
    #1;
    if (we_p) begin
      automatic int d = int'(wa_p) / 4, v = (int'(wa_p) / 2) % 2, u = int'(wa_p) % 2;
      automatic word_t m = x[d][2*v][2*u];
      for (int p = 0; p < 2; p++) for (int q = 0; q < 2; q++) if (x[d][2*v+p][2*u+q] > m) m = x[d][2*v+p][2*u+q];
      chk(wd_p == m, $sformatf("pool write %0d got %0d exp %0d", wa_p, wd_p, m));
      nw_p++;
    end
    if (we_n) begin
      automatic int d = int'(wa_n) / 16, v = (int'(wa_n) / 4) % 4, u = int'(wa_n) % 4;
      chk(wd_n == x[d][v][u], $sformatf("plain write %0d", wa_n));
      nw_n++;
    end
  end

  initial begin
    #22 rst_n = 1;
    for (int d = 0; d < D; d++) for (int v = 0; v < W; v++) for (int u = 0; u < W; u++)
      x[d][v][u] = word_t'($urandom_range(0, 2000)) - 16'sd200;
    @(posedge clk); #2;
    for (int v = 0; v < W; v++) for (int d = 0; d < D; d++) for (int u = 0; u < W; u++) begin
      in_valid = 1; in_d = 16'(d); in_u = 16'(u); in_v = 16'(v); in_x = x[d][v][u];
      @(posedge clk); #2;
      in_valid = 0;
      // a registered write appears exactly one cycle after its input
      if (v % 2 == 1 && u % 2 == 1) chk(we_p, "pool write one cycle after the fourth input");
      else chk(!we_p, "no pool write");
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #0;
    end
    @(posedge clk); #2;
    chk(nw_p == D * W * W / 4, "number of pooled writes");
    chk(nw_n == D * W * W, "number of plain writes");
    // output layer: several images, one with a tie
    for (int img = 0; img < 6; img++) begin
      automatic word_t s[5]; automatic int best = 0;
      for (int d = 0; d < 5; d++) s[d] = word_t'($urandom_range(0, 50));
      if (img == 3) begin s[1] = 16'sd60; s[4] = 16'sd60; end
      for (int d = 1; d < 5; d++) if (s[d] > s[best]) best = d;
      for (int d = 0; d < 5; d++) begin
        in_valid_l = 1; in_d_l = 16'(d); in_x_l = s[d];
        @(posedge clk); #2;
        in_valid_l = 0;
        chk(rv_l == (d == 4), "label valid after last output");
        if (d == 4) begin
          chk(int'(rc_l) == best, $sformatf("label %0d exp %0d", rc_l, best));
          chk(rs_l == s[best], "score");
        end
      end
    end
    chk(!we_l, "output layer writes no FLM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
