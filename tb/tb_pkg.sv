// tb_pkg: reference model and test data shared by the testbenches.
//
// hbm_word() defines the content of the HBM2 model: the 16-bit word at word
// address a is a fixed hash of a; image pixels (the 128 MB from byte
// address 384 MB, where the testbenches put the images) are 0..255/256,
// kernel words small and nearly zero-mean, so that features neither vanish
// under ReLU nor saturate and the labels differ from image to image. kernel_word() finds a kernel weight
// or bias at the place the accelerator's data layout puts it, so the
// reference network below and the hardware read the same numbers.
// The reference computes a layer exactly as the hardware is specified to:
// sum of 16x16-bit products plus bias << FRAC, arithmetic shift right by
// FRAC, ReLU, saturation to 16 bits, then 2x2 max pooling or the label.
package tb_pkg;
  import cnn_pkg::*;

  function automatic word_t hbm_word(longint a);
    longint unsigned h;
    h = (longint'(a) * 64'd2654435761) ^ (longint'(a) >> 7);
    h = h ^ (h >> 13);
    if (a >= 64'h0C00_0000 && a < 64'h1000_0000) return word_t'(int'((h >> 17) % 256));   // images
    return word_t'(int'((h >> 17) % 256) - 120);                     // kernels
  endfunction

  // word of a kernel batch as stored in HBM2: batch b (0-based), word w
  function automatic longint kernel_waddr(layer_cfg_t l, int pb, int b, int w);
    int wlw, p, off;
    wlw = wl_beats(l) * WPB;
    p   = w / wlw;
    off = w % wlw;
    return (longint'(pb + p + 1) * PART_BYTES + longint'(b) * wlw * 2 + longint'(off) * 2) / 2;
  endfunction

  function automatic word_t weight(layer_cfg_t l, int pb, int d, int c, int j, int k);
    int db, w;
    db = dpb(l);
    w  = ((d % db) * int'(l.c) + c) * kk(l) + j * int'(l.k) + k;
    return hbm_word(kernel_waddr(l, pb, d / db, w));
  endfunction

  function automatic word_t bias(layer_cfg_t l, int pb, int d);
    int db;
    db = dpb(l);
    return hbm_word(kernel_waddr(l, pb, d / db, db * int'(l.c) * kk(l) + d % db));
  endfunction

  function automatic word_t requant_relu(longint acc);
    longint s;
    s = acc >>> FRAC;
    if (s < 0) return '0;
    if (s > 32767) return 16'sh7fff;
    return word_t'(s);
  endfunction

  // one layer; x is [c][y][x] (or a vector), result is [d][y][x] after pooling,
  // or for the output layer {label, score} in y[0], y[1]
  function automatic void ref_layer(layer_cfg_t l, int pb, const ref word_t x[], ref word_t y[]);
    int H, C, D, K, OH;
    word_t conv[];
    H = int'(l.h); C = int'(l.c); D = int'(l.d); K = int'(l.k);
    conv = new[D * H * H];
    for (int d = 0; d < D; d++)
      for (int v = 0; v < H; v++)
        for (int u = 0; u < H; u++) begin
          longint acc = 0;
          for (int c = 0; c < C; c++)
            for (int j = 0; j < K; j++)
              for (int k = 0; k < K; k++) begin
                int yy = v + j - K / 2, xx = u + k - K / 2;
                if (yy >= 0 && yy < H && xx >= 0 && xx < H)
                  acc += longint'(x[(c * H + yy) * H + xx]) * longint'(weight(l, pb, d, c, j, k));
              end
          acc += longint'(bias(l, pb, d)) <<< FRAC;
          conv[(d * H + v) * H + u] = requant_relu(acc);
        end
    if (l.last) begin
      int best = 0;
      for (int d = 1; d < D; d++) if (conv[d] > conv[best]) best = d;
      y = new[2];
      y[0] = word_t'(best); y[1] = conv[best];
    end else if (l.pool) begin
      OH = H / 2;
      y = new[D * OH * OH];
      for (int d = 0; d < D; d++)
        for (int v = 0; v < OH; v++)
          for (int u = 0; u < OH; u++) begin
            word_t m = conv[(d * H + 2 * v) * H + 2 * u];
            for (int p = 0; p < 2; p++)
              for (int q = 0; q < 2; q++)
                if (conv[(d * H + 2 * v + p) * H + 2 * u + q] > m) m = conv[(d * H + 2 * v + p) * H + 2 * u + q];
            y[(d * OH + v) * OH + u] = m;
          end
    end else y = conv;
  endfunction

  // a small three-layer network used by the block and system testbenches:
  // conv 3->4 on 4x4, conv 4->4 with pooling, fc 16->6 giving the label
  localparam int TL = 3;
  localparam layer_cfg_t [TL-1:0] TINY = '{
    2: lc(16, 6, 1, 1, 4, 1'b0, 1'b1, 2, 1),
    1: lc( 4, 4, 4, 3, 2, 1'b1, 1'b0, 1, 2),
    0: lc( 3, 4, 4, 3, 3, 1'b0, 1'b0, 2, 1)
  };
endpackage
