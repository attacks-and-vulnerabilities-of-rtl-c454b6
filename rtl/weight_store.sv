// weight_store: the accelerator's weight memory, 16 ROM banks.
//
// Group A (rd_grp = 0) holds the Conv1, Conv2 and FC2 weights in 8 banks,
// group B (rd_grp = 1) the FC1 weights in 8 banks. A read names the group
// and the word's global index; the low 3 bits pick the bank and the rest is
// the bank address. Only the addressed bank is enabled. rd_data shows the
// word one clock after rd_en and holds it while rd_en is low.
//
// The weight trojan's payload site sits on the output of the bank that holds
// the target word (Conv1 kernel 15, weight 9: group A, bank 6, address 16).
// With TROJAN_EN set, trojan_offset is added to that word whenever it is
// read; with TROJAN_EN clear, or offset zero, the memory is the clean one.
// The bank count and grouping follow the design; the word order, latency and
// the placement of the site on the bank output are this design's choices.
module weight_store
  import lenet_pkg::*;
#(
  parameter bit TROJAN_EN = 1'b0
) (
  input  logic               clk,
  input  logic               rd_en,
  input  logic               rd_grp,
  input  logic [W_IDX_W-1:0] rd_idx,
  output q_t                 rd_data,
  input  q_t                 trojan_offset
);

  localparam int unsigned BW = $clog2(W_BANKS);

  logic [BW-1:0]        bank;
  logic [W_BANK_AW-1:0] baddr;
  q_t                   dout [2][W_BANKS];

  assign bank  = rd_idx[BW-1:0];
  assign baddr = W_BANK_AW'(rd_idx >> BW);

  // Read-side registers: which bank answers, and at which address.
  logic                 grp_q;
  logic [BW-1:0]        bank_q;
  logic [W_BANK_AW-1:0] baddr_q;

  always_ff @(posedge clk)
    if (rd_en) begin
      grp_q   <= rd_grp;
      bank_q  <= bank;
      baddr_q <= baddr;
    end

  for (genvar g = 0; g < 2; g++) begin : g_grp
    for (genvar b = 0; b < W_BANKS; b++) begin : g_bank
      q_t raw;
      weight_rom #(
        .GRP  (g[0]),
        .BANK (b),
        .DEPTH(g == 0 ? W_GRPA_DEPTH : W_GRPB_DEPTH),
        .AW   (W_BANK_AW)
      ) u_rom (
        .clk    (clk),
        .rd_en  (rd_en && rd_grp == g[0] && bank == BW'(b)),
        .rd_addr(baddr),
        .rd_data(raw)
      );
      if (g == 0 && b == TGT_W_BANK) begin : g_site
        trojan_inject #(
          .AW      (W_BANK_AW),
          .MATCH_LO(TGT_W_ADDR),
          .MATCH_HI(TGT_W_ADDR)
        ) u_site (
          .enable  (TROJAN_EN),
          .addr    (baddr_q),
          .data_in (raw),
          .offset  (trojan_offset),
          .data_out(dout[g][b])
        );
      end else begin : g_plain
        assign dout[g][b] = raw;
      end
    end
  end

  assign rd_data = dout[grp_q][bank_q];

endmodule
