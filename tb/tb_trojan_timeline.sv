// tb_trojan_timeline: runs the four triggers at their full sizes until the
// last gradual trigger reaches its payload, one processed image per clock.
//
//   gdat_trigger, 15-bit counter, feature-map payload 7373
//   gdat_trigger, 13-bit counter, weight payload 22320
//   gdat_trigger, 13-bit counter, bias payload 17121
//   sdat_trigger, 29-bit counter, arming at 473,040,000 images, payload 7373
//
// After n images a gradual trigger must show min(floor(n / 2^W), payload)
// and the sudden one 0 below 473,040,000 images and the payload from there.
// The checkpoints are the end of a two-week functional test at 30 images
// per second (36,288,000 images), and the image before and the image at
// which each gradual trigger reaches its payload; the sudden trigger must
// still be dormant at all of them. Running on to its activation, six months
// in, would take twice as long; tb_sdat_trigger checks the arming itself
// with a small counter.
module tb_trojan_timeline;
  import lenet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LIFE = 241_598_464;

  logic rst_n = 0, sample = 0;
  q_t off_fm, off_w, off_b, off_s;

  gdat_trigger #(.CNT_W(15), .PAYLOAD(PAYLOAD_FMAP)) u_fm (
    .clk, .rst_n, .sample_done(sample), .offset(off_fm));
  gdat_trigger #(.CNT_W(13), .PAYLOAD(PAYLOAD_WEIGHT)) u_w (
    .clk, .rst_n, .sample_done(sample), .offset(off_w));
  gdat_trigger #(.CNT_W(13), .PAYLOAD(PAYLOAD_BIAS)) u_b (
    .clk, .rst_n, .sample_done(sample), .offset(off_b));
  sdat_trigger #(.CNT_W(29), .ACTIVATE(473_040_000), .PAYLOAD(PAYLOAD_FMAP)) u_s (
    .clk, .rst_n, .sample_done(sample), .offset(off_s));

  initial begin
    repeat (LIFE + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gdat_expect(int n, int w, q_t p);
    int steps = n >>> w;
    return (steps > int'(p)) ? int'(p) : steps;
  endfunction

  task automatic check(string name, q_t got, int exp, int n);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL %s after %0d images: offset %0d, expected %0d", name, n, got, exp);
    end
  endtask

  int points [7] = '{
    36_288_000,
    140_255_231, 140_255_232,   // bias:        17121 x 2^13
    182_845_439, 182_845_440,   // weight:      22320 x 2^13
    241_598_463, LIFE           // feature map:  7373 x 2^15
  };

  initial begin : run
    automatic int n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    sample = 1;  // one image per clock from here on
    foreach (points[i]) begin
      repeat (points[i] - n) @(posedge clk);
      n = points[i];
      @(negedge clk);
      check("gdat feature map", off_fm, gdat_expect(n, 15, PAYLOAD_FMAP), n);
      check("gdat weight", off_w, gdat_expect(n, 13, PAYLOAD_WEIGHT), n);
      check("gdat bias", off_b, gdat_expect(n, 13, PAYLOAD_BIAS), n);
      check("sdat", off_s, (n >= 473_040_000) ? int'(PAYLOAD_FMAP) : 0, n);
      $display("after %0d images: offsets %0d %0d %0d %0d", n, off_fm, off_w, off_b, off_s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
