// fmap_ram: read-write memory for one layer's feature maps.
//
// Feature maps change with every image, so each layer's output lives in a
// RAM that the accelerator writes while computing the layer and reads while
// computing the next one. One write port and one read port, both synchronous
// to clk: a write with wr_en stores wr_data at wr_addr at the clock edge; a
// read with rd_en shows mem[rd_addr[IW-1:0]] on rd_data one clock later and holds it
// while rd_en is low. Reading a word in the same cycle it is written returns
// the old contents. Keeping feature maps in RAM follows the design; one RAM
// per layer and the port timing are this design's choices.
module fmap_ram
  import lenet_pkg::*;
#(
  parameter int unsigned DEPTH = IN_WORDS,
  parameter int unsigned AW    = FMAP_AW
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  q_t            wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output q_t            rd_data
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  q_t mem [DEPTH];


  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < AW'(DEPTH)) mem[wr_addr[IW-1:0]] <= wr_data;
    if (rd_en && rd_addr < AW'(DEPTH)) rd_data <= mem[rd_addr[IW-1:0]];
  end

endmodule
