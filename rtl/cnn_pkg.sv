// cnn_pkg: types and constants shared by the 8-bit dynamic fixed-point CNN
// accelerator.
//
// The network is a ZynqNet variant (a SqueezeNet derivative built only from
// convolutions) cut down to 32 output classes: 26 convolution layers followed
// by an 8x8 average pooling.  Every activation, weight and bias is an 8-bit
// two's-complement mantissa; each layer has its own fractional length (fl)
// for input activations, weights/bias and output activations, so a value is
// mantissa * 2^-fl.  A negative fl means the mantissa is implicitly extended
// with -fl zero bits on the right.
//
// The layer table below is the network definition (kernel size, stride,
// channel counts, feature-map size and fractional lengths per layer).  The
// buffer assignment (which feature-map cache a layer reads), the output
// channel offset used to concatenate the two expand branches of a fire module
// and the memory bases are this implementation's own choices; they are
// derived in layer_def_rom.
package cnn_pkg;

  localparam int unsigned N_LAYERS   = 26;
  localparam int unsigned N_CLASSES  = 32;   // conv10 output channels
  localparam int unsigned BLK        = 8;    // block edge (pixels)
  localparam int unsigned KTAPS      = 9;    // 3x3 kernel taps = weight partitions
  localparam int unsigned ACC_W      = 24;   // output register array width

  typedef logic signed [7:0]       act_t;    // 8-bit mantissa
  typedef logic signed [ACC_W-1:0] acc_t;    // convolution result
  typedef logic signed [4:0]       fl_t;     // fractional length

  typedef act_t [BLK-1:0]   fm_row_t;        // one 8-pixel block row, lane c = column c
  typedef act_t [KTAPS-1:0] wrow_t;          // one weight-cache row (9 partitions)
  typedef act_t [KTAPS-1:0] kernel_t;        // kernel taps, index ky*3+kx

  // Network definition, one entry per convolution layer.
  typedef struct packed {
    logic [9:0] ch_in;
    logic [9:0] ch_out;
    logic [2:0] lg_bps;   // log2 of blocks per side of the input map (256 px -> 5)
    logic       k3;       // 1: 3x3 kernel, 0: 1x1 kernel
    logic       stride2;  // 1: stride 2 (only with 3x3)
    fl_t        fl_in;
    fl_t        fl_w;     // weights and bias
    fl_t        fl_out;
  } net_layer_t;

  // Full layer definition as stored in the layer ROM.
  typedef struct packed {
    net_layer_t  net;
    logic        src_buf;     // feature-map cache holding the layer input
    logic [9:0]  ch_base;     // first output channel written (fire concat)
    logic [17:0] w_row_base;  // first weight-cache row of this layer
    logic [11:0] b_base;      // first bias-cache entry of this layer
  } layer_def_t;

  function automatic net_layer_t L(int ci, int co, int px, bit k3, bit s2,
                                   int fi, int fw, int fo);
    net_layer_t l;
    l.ch_in  = 10'(ci);
    l.ch_out = 10'(co);
    l.lg_bps = 3'($clog2(px / 8));
    l.k3     = k3;
    l.stride2 = s2;
    l.fl_in  = fl_t'(fi);
    l.fl_w   = fl_t'(fw);
    l.fl_out = fl_t'(fo);
    return l;
  endfunction

  //                                     CHin CHout WxH  3x3 s2  fl_in fl_w fl_out
  localparam net_layer_t NET [N_LAYERS] = '{
    L(  3,  64, 256, 1, 1,  0, 7, -2),   // conv1
    L( 64,  16, 128, 1, 1, -2, 6, -4),   // fire2/squeeze3x3
    L( 16,  64,  64, 0, 0, -4, 6, -4),   // fire2/expand1x1
    L( 16,  64,  64, 1, 0, -4, 7, -4),   // fire2/expand3x3
    L(128,  16,  64, 0, 0, -4, 6, -6),   // fire3/squeeze1x1
    L( 16,  64,  64, 0, 0, -6, 7, -5),   // fire3/expand1x1
    L( 16,  64,  64, 1, 0, -6, 7, -5),   // fire3/expand3x3
    L(128,  32,  64, 1, 1, -5, 8, -7),   // fire4/squeeze3x3
    L( 32, 128,  32, 0, 0, -7, 7, -6),   // fire4/expand1x1
    L( 32, 128,  32, 1, 0, -7, 8, -6),   // fire4/expand3x3
    L(256,  32,  32, 0, 0, -6, 7, -7),   // fire5/squeeze1x1
    L( 32, 128,  32, 0, 0, -7, 7, -6),   // fire5/expand1x1
    L( 32, 128,  32, 1, 0, -7, 7, -6),   // fire5/expand3x3
    L(256,  64,  32, 1, 1, -6, 8, -7),   // fire6/squeeze3x3
    L( 64, 256,  16, 0, 0, -7, 7, -6),   // fire6/expand1x1
    L( 64, 256,  16, 1, 0, -7, 8, -6),   // fire6/expand3x3
    L(512,  64,  16, 0, 0, -6, 7, -7),   // fire7/squeeze1x1
    L( 64, 192,  16, 0, 0, -7, 8, -5),   // fire7/expand1x1
    L( 64, 192,  16, 1, 0, -7, 8, -5),   // fire7/expand3x3
    L(384, 112,  16, 1, 1, -5, 8, -6),   // fire8/squeeze3x3
    L(112, 256,   8, 0, 0, -6, 8, -4),   // fire8/expand1x1
    L(112, 256,   8, 1, 0, -6, 8, -4),   // fire8/expand3x3
    L(512, 112,   8, 0, 0, -4, 8, -4),   // fire9/squeeze1x1
    L(112, 368,   8, 0, 0, -4, 8, -2),   // fire9/expand1x1
    L(112, 368,   8, 1, 0, -4, 9, -2),   // fire9/expand3x3
    L(736,  32,   8, 0, 0, -2, 9, -1)    // conv10
  };

  // A layer is the second branch of a fire module when it is an expand3x3
  // that follows an expand1x1 of the same shape: it reads the same input and
  // writes after the expand1x1 channels.
  function automatic bit is_expand3(int i);
    return i > 0 && NET[i].k3 && !NET[i].stride2 && !NET[i-1].k3 &&
           NET[i].ch_in == NET[i-1].ch_in && NET[i].ch_out == NET[i-1].ch_out;
  endfunction

  // Weight-cache rows used by a layer: one row per 3x3 kernel, 1x1 weights
  // packed nine per row, each layer starting on a fresh row.
  function automatic int unsigned w_rows(net_layer_t l);
    int unsigned n;
    n = int'(l.ch_in) * int'(l.ch_out);
    return l.k3 ? n : (n + KTAPS - 1) / KTAPS;
  endfunction

  // Builds the layer ROM contents: ping-pong buffer assignment, fire-module
  // concatenation offsets and memory bases.
  function automatic layer_def_t layer_def(int i);
    layer_def_t d;
    int unsigned wr, br;
    bit buf_sel;
    wr = 0; br = 0; buf_sel = 1'b0;   // the image is loaded into cache 0
    for (int j = 0; j < i; j++) begin
      wr += w_rows(NET[j]);
      br += int'(NET[j].ch_out);
      if (!is_expand3(j + 1)) buf_sel = ~buf_sel;
    end
    d.net        = NET[i];
    d.src_buf    = buf_sel;
    d.ch_base    = is_expand3(i) ? NET[i-1].ch_out : 10'd0;
    d.w_row_base = 18'(wr);
    d.b_base     = 12'(br);
    return d;
  endfunction

  // Row address in a feature-map cache of row r of block (bx, by) of
  // channel ch, for a map of 2^lg_bps x 2^lg_bps blocks.  Channels, blocks
  // and rows are all powers of two, so the offset is shifts and adds.
  function automatic logic [16:0] fm_row_addr(logic [9:0] ch, logic [4:0] bx,
                                              logic [4:0] by, logic [2:0] r,
                                              logic [2:0] lg_bps);
    logic [16:0] blk;
    blk = (17'(ch) << (2 * lg_bps)) + (17'(by) << lg_bps) + 17'(bx);
    return (blk << 3) + 17'(r);
  endfunction

  function automatic int unsigned total_w_rows();
    int unsigned s;
    s = 0;
    for (int j = 0; j < N_LAYERS; j++) s += w_rows(NET[j]);
    return s;
  endfunction

  function automatic int unsigned total_bias();
    int unsigned s;
    s = 0;
    for (int j = 0; j < N_LAYERS; j++) s += int'(NET[j].ch_out);
    return s;
  endfunction

endpackage
