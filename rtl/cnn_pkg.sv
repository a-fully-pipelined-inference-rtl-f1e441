// cnn_pkg: types and constants shared by the VGG-16 inference accelerator.
//
// Numbers: feature maps, weights and biases are 16-bit two's-complement fixed
// point with FRAC fractional bits (16-bit fixed point follows the design
// description; the Q8.8 split is this design's choice). The kernel path reads
// HBM2 through 256-bit AXI4 read channels, 16 words per beat.
//
// A layer of the network is described by one packed layer_cfg_t. A fully
// connected layer is a dense convolution: c is the flattened input length,
// h = 1 and k = 1. Convolutions are 3x3 with stride 1 and one pixel of zero
// padding (VGG-16), so an output map has the input's height and width; pool
// halves both. kb is the number of kernel batches loaded per row of output
// maps, nport the number of HBM2 ports of the layer's address generator.
// The tables VGG16_CIFAR and VGG16_IMAGENET are the two VGG-16 variants the
// accelerator was evaluated with; the per-layer multiplier counts (27, 72, 64),
// kernel batches per row and port counts are the published configuration,
// except the kernel batches of the ImageNet fc layers, chosen here to divide
// the layer sizes.
package cnn_pkg;

  localparam int DW        = 16;   // data word
  localparam int FRAC      = 8;    // fractional bits of the fixed-point format
  localparam int AXI_DW    = 256;  // AXI4 data width (bits)
  localparam int AXI_AW    = 33;   // 8 GB HBM2 address space
  localparam int AXI_IDW   = 1;
  localparam int WPB       = AXI_DW / DW;   // words per AXI beat (16)
  localparam int BEAT_B    = AXI_DW / 8;    // bytes per beat (32)
  localparam longint PART_BYTES = 64'd268435456; // 256 MB pseudo-channel region per AXI port

  typedef logic signed [DW-1:0] word_t;

  typedef struct packed {
    logic [15:0] c;      // input channels (fc: flattened input length)
    logic [15:0] d;      // output channels / neurons
    logic [15:0] h;      // input height = width (fc: 1)
    logic [3:0]  k;      // kernel size (3 or 1)
    logic [7:0]  par;    // input channels consumed per cycle (multipliers = par*k*k)
    logic        pool;   // 2x2 max pooling after the layer
    logic        last;   // output layer: phase 4 finds the label
    logic [15:0] kb;     // kernel batches per row of output maps
    logic [3:0]  nport;  // HBM2 ports of this layer's AGB
  } layer_cfg_t;

  function automatic layer_cfg_t lc(int c, int d, int h, int k, int par, bit pool,
                                    bit last, int kb, int nport);
    layer_cfg_t r;
    r.c = 16'(c); r.d = 16'(d); r.h = 16'(h); r.k = 4'(k); r.par = 8'(par);
    r.pool = pool; r.last = last; r.kb = 16'(kb); r.nport = 4'(nport);
    return r;
  endfunction

  localparam int VGG_L = 16;

  // VGG-16 for 3x32x32 CIFAR-100 images (15.29 M parameters).
  localparam layer_cfg_t [VGG_L-1:0] VGG16_CIFAR = '{
    15: lc(512, 100, 1, 1, 64, 1'b0, 1'b1,   4, 1),
    14: lc(512, 512, 1, 1, 64, 1'b0, 1'b0,  16, 1),
    13: lc(512, 512, 1, 1, 64, 1'b0, 1'b0,  16, 1),
    12: lc(512, 512, 2, 3,  8, 1'b1, 1'b0, 128, 3),
    11: lc(512, 512, 2, 3,  8, 1'b0, 1'b0, 128, 3),
    10: lc(512, 512, 2, 3,  8, 1'b0, 1'b0, 128, 3),
     9: lc(512, 512, 4, 3,  8, 1'b1, 1'b0,  64, 3),
     8: lc(512, 512, 4, 3,  8, 1'b0, 1'b0,  64, 3),
     7: lc(256, 512, 4, 3,  8, 1'b0, 1'b0,  32, 2),
     6: lc(256, 256, 8, 3,  8, 1'b1, 1'b0,  32, 2),
     5: lc(256, 256, 8, 3,  8, 1'b0, 1'b0,  32, 2),
     4: lc(128, 256, 8, 3,  8, 1'b0, 1'b0,  16, 2),
     3: lc(128, 128,16, 3,  8, 1'b1, 1'b0,  16, 2),
     2: lc( 64, 128,16, 3,  8, 1'b0, 1'b0,   8, 1),
     1: lc( 64,  64,32, 3,  8, 1'b1, 1'b0,   4, 1),
     0: lc(  3,  64,32, 3,  3, 1'b0, 1'b0,   1, 1)
  };

  // VGG-16 for 3x224x224 ImageNet images (138.36 M parameters).
  localparam layer_cfg_t [VGG_L-1:0] VGG16_IMAGENET = '{
    15: lc(4096, 1000, 1, 1, 64, 1'b0, 1'b1,   40, 1),
    14: lc(4096, 4096, 1, 1, 64, 1'b0, 1'b0, 1024, 1),
    13: lc(25088,4096, 1, 1, 64, 1'b0, 1'b0, 1024, 1),
    12: lc(512, 512, 14, 3,  8, 1'b1, 1'b0, 128, 3),
    11: lc(512, 512, 14, 3,  8, 1'b0, 1'b0, 128, 3),
    10: lc(512, 512, 14, 3,  8, 1'b0, 1'b0, 128, 3),
     9: lc(512, 512, 28, 3,  8, 1'b1, 1'b0,  64, 3),
     8: lc(512, 512, 28, 3,  8, 1'b0, 1'b0,  64, 3),
     7: lc(256, 512, 28, 3,  8, 1'b0, 1'b0,  32, 2),
     6: lc(256, 256, 56, 3,  8, 1'b1, 1'b0,  32, 2),
     5: lc(256, 256, 56, 3,  8, 1'b0, 1'b0,  32, 2),
     4: lc(128, 256, 56, 3,  8, 1'b0, 1'b0,  16, 2),
     3: lc(128, 128,112, 3,  8, 1'b1, 1'b0,  16, 2),
     2: lc( 64, 128,112, 3,  8, 1'b0, 1'b0,   8, 1),
     1: lc( 64,  64,224, 3,  8, 1'b1, 1'b0,   4, 1),
     0: lc(  3,  64,224, 3,  3, 1'b0, 1'b0,   1, 1)
  };

  // ---- derived sizes -------------------------------------------------------
  function automatic int kk(layer_cfg_t l);        return int'(l.k) * int'(l.k); endfunction
  function automatic int nrd(layer_cfg_t l);       return int'(l.par) * kk(l); endfunction // multipliers
  function automatic int out_hw(layer_cfg_t l);    return l.pool ? int'(l.h) / 2 : int'(l.h); endfunction
  function automatic int ifm_words(layer_cfg_t l); return int'(l.c) * int'(l.h) * int'(l.h); endfunction
  function automatic int ofm_words(layer_cfg_t l); return int'(l.d) * out_hw(l) * out_hw(l); endfunction
  function automatic int dpb(layer_cfg_t l);       return int'(l.d) / int'(l.kb); endfunction   // outputs per batch
  // len(KBatch) in words: dpb weight kernels followed by dpb biases
  function automatic int kbatch_words(layer_cfg_t l);
    return dpb(l) * (int'(l.c) * kk(l) + 1);
  endfunction
  // len(Workload) = len(KBatch) / #Port, rounded up to whole beats
  function automatic int wl_beats(layer_cfg_t l);
    return (kbatch_words(l) + WPB * int'(l.nport) - 1) / (WPB * int'(l.nport));
  endfunction
  function automatic int klm_words(layer_cfg_t l); return wl_beats(l) * WPB * int'(l.nport); endfunction

  function automatic int clog2c(int v); return (v <= 2) ? 1 : $clog2(v); endfunction

  // ---- AXI4 read channels (the two channels the accelerator uses) ----------
  typedef struct packed {
    logic [AXI_IDW-1:0] id;
    logic [AXI_AW-1:0]  addr;
    logic [7:0]         len;    // beats - 1
    logic [2:0]         size;   // 3'b101: 32 bytes
    logic [1:0]         burst;  // 2'b01: INCR
  } axi_ar_t;

  typedef struct packed {
    logic [AXI_IDW-1:0] id;
    logic [AXI_DW-1:0]  data;
    logic [1:0]         resp;
    logic               last;
  } axi_r_t;

endpackage
