// weight_rom: one bank of the weight read-only memory.
//
// The weights are spread over 16 such banks, 8 for the Conv1, Conv2 and FC2
// weights (group A) and 8 for the FC1 weights (group B). Bank BANK of group
// GRP holds the words whose global index g satisfies g % 8 == BANK, at
// address g / 8. The contents are fixed at elaboration from
// lenet_pkg::weight_value, so the bank synthesises as an initialised ROM.
//
// Interface and timing: synchronous read. When rd_en is high, rd_data shows
// mem[rd_addr[IW-1:0]] one clock later and holds it while rd_en is low.
// The 16-bank split follows the design; the interleaved word order and the
// one-cycle read latency are this design's choices.
module weight_rom
  import lenet_pkg::*;
#(
  parameter bit          GRP   = 1'b0,
  parameter int unsigned BANK  = 0,
  parameter int unsigned DEPTH = W_GRPA_DEPTH,
  parameter int unsigned AW    = W_BANK_AW
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output q_t            rd_data
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  q_t mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++)
      mem[a] = weight_value(GRP, a * W_BANKS + BANK);
  end

  always_ff @(posedge clk)
    if (rd_en && rd_addr < AW'(DEPTH)) rd_data <= mem[rd_addr[IW-1:0]];

endmodule
