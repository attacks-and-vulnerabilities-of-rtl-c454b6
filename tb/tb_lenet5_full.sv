// tb_lenet5_full: the accelerator exactly as configured by default
// (feature-map target, gradual trigger with its 15-bit counter) runs three
// images. The trojan must stay at offset zero, so the outputs must equal
// the clean behavioural model; the run length and the digit are checked too.
module tb_lenet5_full;
  import lenet_pkg::*;
  import lenet_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, img_we = 0, start = 0;
  logic [9:0] img_addr = '0;
  q_t img_data = '0;
  logic busy, done;
  logic [3:0] class_id;
  q_t class_val;
  q_t logits [FC2_N];

  lenet5_accel u_dut (.clk, .rst_n, .img_we, .img_addr, .img_data, .start, .busy, .done,
                      .class_id, .class_val, .logits);

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img [900];
    vec_t ref_out;
    int cyc;
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3; n++) begin
      make_image(img);
      for (int a = 0; a < 900; a++) begin
        img_we = 1; img_addr = 10'(a); img_data = q_t'(img[a]);
        @(negedge clk);
      end
      img_we = 0;
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 910_997) begin failures++; $display("FAIL run took %0d clocks", cyc); end
      ref_out = forward(img, TGT_FMAP, 0);
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (int'(logits[i]) != ref_out[i]) begin
          failures++; $display("FAIL image %0d out %0d: got %0d exp %0d", n, i, logits[i], ref_out[i]);
        end
      end
      checks++;
      if (int'(class_id) != argmax(ref_out) || class_val != q_t'(ref_out[argmax(ref_out)])) begin
        failures++; $display("FAIL image %0d digit %0d exp %0d", n, class_id, argmax(ref_out));
      end
      checks++;
      if (u_dut.offset != 0) begin failures++; $display("FAIL trojan offset %0d", u_dut.offset); end
      $display("image %0d: digit %0d, output %0d", n, class_id, class_val);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
