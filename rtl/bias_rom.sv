// bias_rom: the single read-only memory that holds all 122 biases
// (Conv1 16, Conv2 32, FC1 64, FC2 10; see lenet_pkg for the map).
//
// Contents come from lenet_pkg::bias_value at elaboration. Synchronous read:
// rd_data and rd_idx_q (the index the data belongs to) appear one clock after
// rd_en and hold until the next read. rd_idx_q lets a payload site that sits
// on this memory's output know which word is passing.
// One bias memory follows the design; the latency is this design's choice.
module bias_rom
  import lenet_pkg::*;
(
  input  logic               clk,
  input  logic               rd_en,
  input  logic [B_IDX_W-1:0] rd_idx,
  output q_t                 rd_data,
  output logic [B_IDX_W-1:0] rd_idx_q
);

  q_t mem [B_WORDS];

  initial begin
    for (int unsigned a = 0; a < B_WORDS; a++) mem[a] = bias_value(a);
  end

  always_ff @(posedge clk)
    if (rd_en && rd_idx < B_IDX_W'(B_WORDS)) begin
      rd_data  <= mem[rd_idx];
      rd_idx_q <= rd_idx;
    end

endmodule
