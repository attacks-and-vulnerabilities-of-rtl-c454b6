// lenet_pkg: types, sizes, memory map and parameter contents shared by the
// LeNet-5 accelerator and its accuracy-degrading trojans.
//
// Number format: every weight, bias and feature-map value is a 16-bit
// two's-complement Q1.14 word (sign bit, one integer bit, 14 fraction bits),
// range [-2, 2 - 2^-14]. Arithmetic wraps on overflow; nothing saturates.
//
// Network (follows the LeNet-5 configuration the design targets):
//   input 30x30x1 -> Conv1 3x3, 16 maps, 28x28 -> AvgPool1 2x2, 14x14
//   -> Conv2 3x3, 32 maps, 12x12 -> AvgPool2 2x2, 6x6 -> FC1 64 -> FC2 10.
//   That is 79,242 weights and biases.
//
// Parameter memory map (the split into 16 weight ROM banks plus one bias ROM
// follows the design; the order of words inside them is this design's own):
//   weight group A (8 banks): Conv1, Conv2 and FC2 weights, 5,392 words,
//     global index g, bank g % 8, bank address g / 8 (674 words per bank)
//       Conv1 : g = k*9 + ky*3 + kx                         (k < 16)
//       Conv2 : g = 144 + (k*16 + c)*9 + ky*3 + kx           (k < 32, c < 16)
//       FC2   : g = 4752 + n*64 + i                          (n < 10, i < 64)
//   weight group B (8 banks): FC1 weights, 73,728 words, 9,216 per bank
//       FC1   : g = n*1152 + i,  i = c*36 + y*6 + x          (n < 64)
//   bias ROM: Conv1 0..15, Conv2 16..47, FC1 48..111, FC2 112..121
//   feature maps: channel-major, address = c*H*W + y*W + x.
//
// Kernel, weight, bias and neuron numbers in the trojan targets are counted
// from 1 in the design description and from 0 here: kernel 15 is k = 14,
// weight 9 is tap 8 (bottom right), FC2 bias 9 is neuron 8 (digit 8),
// feature map 15 is channel 14.
//
// The trained weights are not available, so the ROM contents are a fixed
// pseudo-random pattern (weight_value / bias_value below), except Conv1
// kernel 15 and its bias, whose published values are used. The accelerator
// computes the same function whatever the contents are.
package lenet_pkg;

  localparam int unsigned QW   = 16;  // word width
  localparam int unsigned FRAC = 14;  // fraction bits (Q1.14)
  typedef logic signed [QW-1:0] q_t;

  localparam q_t Q_QUARTER = 16'sh1000;  // 0.25, the average-pool weight

  // ---- layer sizes ------------------------------------------------------
  localparam int unsigned IN_W   = 30;
  localparam int unsigned C1_W   = 28, C1_C = 16;
  localparam int unsigned P1_W   = 14;
  localparam int unsigned C2_W   = 12, C2_C = 32;
  localparam int unsigned P2_W   = 6;
  localparam int unsigned FC1_N  = 64;
  localparam int unsigned FC2_N  = 10;
  localparam int unsigned FC1_IN = P2_W * P2_W * C2_C;  // 1152

  localparam int unsigned IN_WORDS  = IN_W * IN_W;          // 900
  localparam int unsigned C1_WORDS  = C1_W * C1_W * C1_C;   // 12544
  localparam int unsigned P1_WORDS  = P1_W * P1_W * C1_C;   // 3136
  localparam int unsigned C2_WORDS  = C2_W * C2_W * C2_C;   // 4608
  localparam int unsigned P2_WORDS  = P2_W * P2_W * C2_C;   // 1152
  localparam int unsigned FC1_WORDS = FC1_N;                // 64

  localparam int unsigned FMAP_AW = 14;  // enough for the largest map

  // ---- parameter memories ----------------------------------------------
  localparam int unsigned W_BANKS    = 8;      // banks per weight group
  localparam int unsigned W_CONV1_BASE = 0;
  localparam int unsigned W_CONV2_BASE = 144;
  localparam int unsigned W_FC2_BASE   = 4752;
  localparam int unsigned W_GRPA_WORDS = 5392;
  localparam int unsigned W_GRPB_WORDS = FC1_N * FC1_IN;  // 73728
  localparam int unsigned W_GRPA_DEPTH = W_GRPA_WORDS / W_BANKS;  // 674
  localparam int unsigned W_GRPB_DEPTH = W_GRPB_WORDS / W_BANKS;  // 9216
  localparam int unsigned W_IDX_W      = 17;
  localparam int unsigned W_BANK_AW    = 14;

  localparam int unsigned B_CONV1_BASE = 0;
  localparam int unsigned B_CONV2_BASE = 16;
  localparam int unsigned B_FC1_BASE   = 48;
  localparam int unsigned B_FC2_BASE   = 112;
  localparam int unsigned B_WORDS      = 122;
  localparam int unsigned B_IDX_W      = 7;

  typedef enum logic [2:0] {
    L_CONV1 = 3'd0, L_POOL1 = 3'd1, L_CONV2 = 3'd2,
    L_POOL2 = 3'd3, L_FC1 = 3'd4, L_FC2 = 3'd5
  } layer_e;

  // Memory that feeds each layer / receives its result.
  typedef enum logic [2:0] {
    M_IN = 3'd0, M_C1 = 3'd1, M_P1 = 3'd2, M_C2 = 3'd3, M_P2 = 3'd4,
    M_F1 = 3'd5, M_F2 = 3'd6
  } fmap_e;


  // ---- per-layer loop configuration ----------------------------------------
  // out[oc][oy][ox] = f( bias[b_base+oc] +
  //     sum over ic < ic_n, ky < k, kx < k of
  //       in[ch][oy*stride+ky][ox*stride+kx] * w[w_base+((oc*ic_n+ic)*k+ky)*k+kx] )
  // with ch = oc for the pooling layers (depthwise, weight 0.25, no bias)
  // and ch = ic otherwise. A fully connected layer is the case out_w = 1,
  // k = 1, in_w = 1, in_cs = 1.
  typedef struct packed {
    fmap_e        src;      // memory read
    fmap_e        dst;      // memory written
    logic [6:0]   oc_n;     // output channels / neurons
    logic [4:0]   out_w;    // output width = height
    logic [10:0]  ic_n;     // input channels (or inputs) summed over
    logic [1:0]   k;        // kernel size
    logic [1:0]   stride;
    logic [4:0]   in_w;     // input row length
    logic [9:0]   in_cs;    // input words per channel
    logic         pool;     // depthwise average: weight 0.25, no bias
    logic         w_grp;    // weight group
    logic [12:0]  w_base;   // first weight index in the group
    logic [6:0]   b_base;   // first bias index
    logic         relu;
  } layer_cfg_t;

  function automatic layer_cfg_t layer_cfg(layer_e l);
    layer_cfg_t c;
    c = '0;
    c.k = 2'd1; c.stride = 2'd1; c.in_w = 5'd1; c.in_cs = 10'd1; c.out_w = 5'd1;
    c.ic_n = 11'd1;
    case (l)
      L_CONV1: begin
        c.src = M_IN; c.dst = M_C1; c.oc_n = 7'(C1_C); c.out_w = 5'(C1_W);
        c.k = 2'd3; c.in_w = 5'(IN_W); c.in_cs = 10'(IN_WORDS);
        c.w_base = 13'(W_CONV1_BASE); c.b_base = 7'(B_CONV1_BASE); c.relu = 1'b1;
      end
      L_POOL1: begin
        c.src = M_C1; c.dst = M_P1; c.oc_n = 7'(C1_C); c.out_w = 5'(P1_W);
        c.k = 2'd2; c.stride = 2'd2; c.in_w = 5'(C1_W); c.in_cs = 10'(C1_W * C1_W);
        c.pool = 1'b1;
      end
      L_CONV2: begin
        c.src = M_P1; c.dst = M_C2; c.oc_n = 7'(C2_C); c.out_w = 5'(C2_W);
        c.ic_n = 11'(C1_C); c.k = 2'd3; c.in_w = 5'(P1_W); c.in_cs = 10'(P1_W * P1_W);
        c.w_base = 13'(W_CONV2_BASE); c.b_base = 7'(B_CONV2_BASE); c.relu = 1'b1;
      end
      L_POOL2: begin
        c.src = M_C2; c.dst = M_P2; c.oc_n = 7'(C2_C); c.out_w = 5'(P2_W);
        c.k = 2'd2; c.stride = 2'd2; c.in_w = 5'(C2_W); c.in_cs = 10'(C2_W * C2_W);
        c.pool = 1'b1;
      end
      L_FC1: begin
        c.src = M_P2; c.dst = M_F1; c.oc_n = 7'(FC1_N); c.ic_n = 11'(FC1_IN);
        c.w_grp = 1'b1; c.w_base = 13'd0; c.b_base = 7'(B_FC1_BASE); c.relu = 1'b1;
      end
      default: begin  // L_FC2
        c.src = M_F1; c.dst = M_F2; c.oc_n = 7'(FC2_N); c.ic_n = 11'(FC1_N);
        c.w_base = 13'(W_FC2_BASE); c.b_base = 7'(B_FC2_BASE);
      end
    endcase
    return c;
  endfunction

  // ---- trojans -----------------------------------------------------------
  typedef enum logic [1:0] {
    TGT_NONE = 2'd0, TGT_WEIGHT = 2'd1, TGT_BIAS = 2'd2, TGT_FMAP = 2'd3
  } target_e;

  typedef enum logic {KIND_GDAT = 1'b0, KIND_SDAT = 1'b1} kind_e;

  // Targets: Conv1 kernel 15 weight 9; FC2 bias 9; AvgPool1 feature map 15.
  localparam int unsigned TGT_W_INDEX  = W_CONV1_BASE + 14 * 9 + 8;  // 134
  localparam int unsigned TGT_W_BANK   = TGT_W_INDEX % W_BANKS;     // 6
  localparam int unsigned TGT_W_ADDR   = TGT_W_INDEX / W_BANKS;     // 16
  localparam int unsigned TGT_B_INDEX  = B_FC2_BASE + 8;            // 120
  localparam int unsigned TGT_FM_LO    = 14 * P1_W * P1_W;          // 2744
  localparam int unsigned TGT_FM_HI    = 15 * P1_W * P1_W - 1;      // 2939

  // Payloads in Q1.14: 1.3623, 1.045, 0.45.
  localparam q_t PAYLOAD_WEIGHT = 16'sd22320;
  localparam q_t PAYLOAD_BIAS   = 16'sd17121;
  localparam q_t PAYLOAD_FMAP   = 16'sd7373;

  // SDAT: six months at 30 samples/s = 473,040,000 samples, 29-bit counter.
  localparam int unsigned SDAT_CNT_W    = 29;
  localparam int unsigned SDAT_ACTIVATE = 473_040_000;

  function automatic q_t target_payload(target_e t);
    case (t)
      TGT_WEIGHT: return PAYLOAD_WEIGHT;
      TGT_BIAS:   return PAYLOAD_BIAS;
      TGT_FMAP:   return PAYLOAD_FMAP;
      default:    return '0;
    endcase
  endfunction

  // GDAT counter sizes: the smallest that keeps accuracy within 1 % of the
  // baseline over the functional-test period (weight 13, bias 13, fmap 15).
  function automatic int unsigned gdat_counter_width(target_e t);
    case (t)
      TGT_FMAP: return 15;
      default:  return 13;
    endcase
  endfunction

  // ---- ROM contents --------------------------------------------------------
  // Integer mixing hash (multiply, xor-shift) giving a reproducible pattern.
  function automatic q_t hash_word(int unsigned idx, int unsigned seed);
    logic [31:0] h;
    h = idx * 32'h9E37_79B1 + seed * 32'h7F4A_7C15;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return q_t'(h[15:0]);
  endfunction

  // Published Conv1 kernel 15, row-major, in Q1.14.
  function automatic q_t k15_value(int unsigned tap);
    case (tap)
      0: return 16'sd2775;   1: return 16'sd1126;   2: return 16'sd4125;
      3: return 16'sd138;    4: return 16'sd1756;   5: return -16'sd70;
      6: return -16'sd4309;  7: return -16'sd3482;  default: return -16'sd4098;
    endcase
  endfunction

  // Weight word at global index idx of group grp (0 = A, 1 = B).
  function automatic q_t weight_value(bit grp, int unsigned idx);
    if (grp == 1'b0) begin
      if (idx < W_CONV2_BASE) begin
        if (idx / 9 == 14) return k15_value(idx % 9);
        return hash_word(idx, 1) >>> 3;              // about +-0.25
      end
      if (idx < W_FC2_BASE) return hash_word(idx, 2) >>> 5;  // about +-0.06
      return hash_word(idx, 3) >>> 3;
    end
    return hash_word(idx, 4) >>> 6;                  // about +-0.03
  endfunction

  function automatic q_t bias_value(int unsigned idx);
    if (idx == B_CONV1_BASE + 14) return 16'sd526;  // 0.0321
    return hash_word(idx, 5) >>> 5;
  endfunction

endpackage
