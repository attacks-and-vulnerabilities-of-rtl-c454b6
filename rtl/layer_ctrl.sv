// layer_ctrl: the sequencer that runs one image through the six layers.
//
// After start it walks Conv1, AvgPool1, Conv2, AvgPool2, FC1 and FC2 in that
// order. Every layer is the same loop nest (see lenet_pkg::layer_cfg): for
// each output word (channel, row, column) it issues one tap per clock, a
// feature-map read plus, for the convolution and fully connected layers, a
// weight read; the multiply-accumulate unit consumes the tap one clock later.
// After the last tap it waits one clock for the last product, then writes the
// finished word into the layer's destination memory and clears the
// accumulator. An output word thus takes taps + 2 clocks:
//   Conv1 12544 x 11, AvgPool1 3136 x 6, Conv2 4608 x 146, AvgPool2 1152 x 6,
//   FC1 64 x 1154, FC2 10 x 66 -> 910,996 clocks per image, plus 1 to start.
// done pulses for one clock after the last FC2 word is written; it is also
// the "sample processed" event that the trojan counters count.
//
// Timing of the outputs, relative to the tap issued in cycle t:
//   rd_*, w_*, b_*   cycle t     (memories answer in cycle t+1)
//   mac_en           cycle t+1
//   wr_*, mac_clear  two cycles after the last tap; result is read then.
// The layer order and sizes follow the design. The one-tap-per-clock schedule
// and everything about the timing are this design's choices, as the design
// description gives no details of the accelerator's datapath.
module layer_ctrl
  import lenet_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output layer_e             layer,
  // feature-map read
  output logic               rd_en,
  output fmap_e              rd_src,
  output logic [FMAP_AW-1:0] rd_addr,
  // weight and bias read
  output logic               w_en,
  output logic               w_grp,
  output logic [W_IDX_W-1:0] w_idx,
  output logic               b_en,
  output logic [B_IDX_W-1:0] b_idx,
  // multiply-accumulate control
  output logic               mac_clear,
  output logic               mac_en,
  output logic               pool,
  output logic               relu,
  output logic               use_bias,
  // feature-map write
  output logic               wr_en,
  output fmap_e              wr_dst,
  output logic [FMAP_AW-1:0] wr_addr,
  output logic [6:0]         wr_oc
);

  typedef enum logic [1:0] {S_IDLE, S_TAPS, S_WAIT, S_WRITE} state_e;

  state_e     state;
  layer_cfg_t cfg;
  logic [6:0]  oc;
  logic [4:0]  oy, ox;
  logic [10:0] ic;
  logic [1:0]  ky, kx;
  logic        last_tap, last_out;

  assign cfg = layer_cfg(layer);

  always_comb begin
    last_tap = (ic == cfg.ic_n - 11'd1) && (ky == cfg.k - 2'd1) && (kx == cfg.k - 2'd1);
    last_out = (oc == cfg.oc_n - 7'd1) && (oy == cfg.out_w - 5'd1) && (ox == cfg.out_w - 5'd1);
  end

  // ---- address generation ----------------------------------------------
  // All products are formed at the full result width.
  logic [FMAP_AW-1:0] in_ch, iy, ix, oc_f, oy_f, ox_f, ow_f;
  logic [W_IDX_W-1:0] oc_w, ic_w, k_w;
  always_comb begin
    oc_f    = FMAP_AW'(oc);
    oy_f    = FMAP_AW'(oy);
    ox_f    = FMAP_AW'(ox);
    ow_f    = FMAP_AW'(cfg.out_w);
    in_ch   = cfg.pool ? oc_f : FMAP_AW'(ic);
    iy      = oy_f * FMAP_AW'(cfg.stride) + FMAP_AW'(ky);
    ix      = ox_f * FMAP_AW'(cfg.stride) + FMAP_AW'(kx);
    rd_addr = in_ch * FMAP_AW'(cfg.in_cs) + iy * FMAP_AW'(cfg.in_w) + ix;
    oc_w    = W_IDX_W'(oc);
    ic_w    = W_IDX_W'(ic);
    k_w     = W_IDX_W'(cfg.k);
    w_idx   = W_IDX_W'(cfg.w_base)
            + ((oc_w * W_IDX_W'(cfg.ic_n) + ic_w) * k_w + W_IDX_W'(ky)) * k_w
            + W_IDX_W'(kx);
    b_idx   = B_IDX_W'(cfg.b_base) + B_IDX_W'(oc);
    wr_addr = oc_f * ow_f * ow_f + oy_f * ow_f + ox_f;
  end

  assign rd_src   = cfg.src;
  assign wr_dst   = cfg.dst;
  assign wr_oc    = oc;
  assign w_grp    = cfg.w_grp;
  assign pool     = cfg.pool;
  assign relu     = cfg.relu;
  assign use_bias = !cfg.pool;

  assign rd_en     = (state == S_TAPS);
  assign w_en      = (state == S_TAPS) && !cfg.pool;
  assign b_en      = (state == S_TAPS) && !cfg.pool;
  assign wr_en     = (state == S_WRITE);
  assign mac_clear = (state == S_WRITE) || (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  // ---- sequencing ------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      layer  <= L_CONV1;
      {oc, oy, ox, ic, ky, kx} <= '0;
      mac_en <= 1'b0;
      done   <= 1'b0;
    end else begin
      mac_en <= (state == S_TAPS);
      done   <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            state <= S_TAPS;
            layer <= L_CONV1;
            {oc, oy, ox, ic, ky, kx} <= '0;
          end
        S_TAPS: begin
          if (kx != cfg.k - 2'd1) kx <= kx + 2'd1;
          else begin
            kx <= '0;
            if (ky != cfg.k - 2'd1) ky <= ky + 2'd1;
            else begin
              ky <= '0;
              ic <= last_tap ? '0 : ic + 11'd1;
            end
          end
          if (last_tap) state <= S_WAIT;
        end
        S_WAIT: state <= S_WRITE;
        S_WRITE: begin
          state <= S_TAPS;
          if (ox != cfg.out_w - 5'd1) ox <= ox + 5'd1;
          else begin
            ox <= '0;
            if (oy != cfg.out_w - 5'd1) oy <= oy + 5'd1;
            else begin
              oy <= '0;
              oc <= last_out ? '0 : oc + 7'd1;
            end
          end
          if (last_out) begin
            if (layer == L_FC2) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              layer <= layer_e'(layer + 3'd1);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A tap is only issued inside the current layer's loop bounds.
  a_tap_in_bounds: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_TAPS |-> (ic < cfg.ic_n && oc < cfg.oc_n && oy < cfg.out_w && ox < cfg.out_w))
    else $error("layer_ctrl: tap outside the loop bounds");

endmodule
