// tb_lenet5_accel: end-to-end test of the accelerator with its trojans.
//
// Five copies of the accelerator see the same eight images:
//   d0 clean (no target)
//   d1 feature-map target, gradual trigger, 1-bit counter, payload 3 LSB
//      (the offset steps every 2 images and saturates at 3)
//   d2 weight target, sudden trigger armed after 3 images, payload 1.3623
//   d3 bias target, gradual trigger, 1-bit counter, payload 1.045
//   d4 feature-map target, sudden trigger armed after 1 image, payload 0.45
// Counters are shortened so the triggers fire within the run; all else is
// at full size. For every image and copy the ten outputs and the digit are
// compared with the behavioural model in lenet_ref_pkg, fed with the offset
// the trigger must have reached by then; the offset itself, the run length
// (910,997 clocks) and the done pulse are checked too. Each mechanism (a
// gradual step, gradual saturation, sudden arming, each payload site
// altering a word, an image write ignored while busy) is counted, and one
// that never happens counts as a failure.
module tb_lenet5_accel;
  import lenet_pkg::*;
  import lenet_ref_pkg::*;

  localparam int ND = 5;
  localparam int NIMG = 8;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, img_we = 0, start = 0;
  logic [9:0] img_addr = '0;
  q_t img_data = '0;
  logic busy [ND], done [ND];
  logic [3:0] class_id [ND];
  q_t class_val [ND];
  q_t logits [ND][FC2_N];

  lenet5_accel #(.TARGET(TGT_NONE)) d0 (.clk, .rst_n, .img_we, .img_addr, .img_data, .start,
    .busy(busy[0]), .done(done[0]), .class_id(class_id[0]), .class_val(class_val[0]), .logits(logits[0]));
  lenet5_accel #(.TARGET(TGT_FMAP), .KIND(KIND_GDAT), .GDAT_CNT_W(1), .PAYLOAD(16'sd3)) d1 (
    .clk, .rst_n, .img_we, .img_addr, .img_data, .start,
    .busy(busy[1]), .done(done[1]), .class_id(class_id[1]), .class_val(class_val[1]), .logits(logits[1]));
  lenet5_accel #(.TARGET(TGT_WEIGHT), .KIND(KIND_SDAT), .SDAT_W(2), .SDAT_ACTIVATE_AT(3)) d2 (
    .clk, .rst_n, .img_we, .img_addr, .img_data, .start,
    .busy(busy[2]), .done(done[2]), .class_id(class_id[2]), .class_val(class_val[2]), .logits(logits[2]));
  lenet5_accel #(.TARGET(TGT_BIAS), .KIND(KIND_GDAT), .GDAT_CNT_W(1)) d3 (
    .clk, .rst_n, .img_we, .img_addr, .img_data, .start,
    .busy(busy[3]), .done(done[3]), .class_id(class_id[3]), .class_val(class_val[3]), .logits(logits[3]));
  lenet5_accel #(.TARGET(TGT_FMAP), .KIND(KIND_SDAT), .SDAT_W(1), .SDAT_ACTIVATE_AT(1)) d4 (
    .clk, .rst_n, .img_we, .img_addr, .img_data, .start,
    .busy(busy[4]), .done(done[4]), .class_id(class_id[4]), .class_val(class_val[4]), .logits(logits[4]));

  target_e tgt [ND] = '{TGT_NONE, TGT_FMAP, TGT_WEIGHT, TGT_BIAS, TGT_FMAP};

  // offset each trigger must hold after n images
  function automatic int exp_offset(int d, int n);
    case (d)
      1: return (n / 2 > 3) ? 3 : n / 2;
      2: return (n >= 3) ? int'(PAYLOAD_WEIGHT) : 0;
      3: return n / 2;
      4: return (n >= 1) ? int'(PAYLOAD_FMAP) : 0;
      default: return 0;
    endcase
  endfunction

  function automatic int dut_offset(int d);
    case (d)
      1: return int'(d1.offset);
      2: return int'(d2.offset);
      3: return int'(d3.offset);
      4: return int'(d4.offset);
      default: return int'(d0.offset);
    endcase
  endfunction

  // mechanism counters
  int n_gdat_step = 0, n_gdat_sat = 0, n_sdat_arm = 0, n_site_w = 0, n_site_b = 0,
      n_site_fm = 0, n_busy_write = 0, n_class_changed = 0;
  int prev_off [ND] = '{default: 0};

  always @(posedge clk) if (rst_n) begin
    if (d2.u_wmem.g_grp[0].g_bank[6].g_site.u_site.hit && d2.offset != 0) n_site_w++;
    if (d3.u_bias_site.hit && d3.offset != 0) n_site_b++;
    if (d4.u_fmap_site.hit && d4.offset != 0 && d4.wr_en && d4.wr_dst == M_P1) n_site_fm++;
  end

  initial begin
    repeat (NIMG * 950_000 + 10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int img [900];
    vec_t ref_out;
    int cyc, off;
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NIMG; n++) begin
      make_image(img);
      for (int a = 0; a < 900; a++) begin
        img_we = 1; img_addr = 10'(a); img_data = q_t'(img[a]);
        @(negedge clk);
      end
      img_we = 0;
      // offsets the triggers hold before this image
      for (int d = 1; d < ND; d++) begin
        off = dut_offset(d);
        expect_true(off == exp_offset(d, n), $sformatf("d%0d offset %0d before image %0d", d, off, n));
        if (d == 1 || d == 3) begin
          if (off != prev_off[d]) n_gdat_step++;
          if (d == 1 && off == 3 && prev_off[d] == 3) n_gdat_sat++;
        end
        if ((d == 2 || d == 4) && off != 0 && prev_off[d] == 0) n_sdat_arm++;
        prev_off[d] = off;
      end
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      // a host write during the run must be ignored
      repeat (10) @(negedge clk);
      cyc += 10;
      img_we = 1; img_addr = 10'd0; img_data = 16'sh3fff; @(negedge clk); img_we = 0;
      cyc++;
      if (busy[0]) n_busy_write++;
      while (!done[0]) begin @(negedge clk); cyc++; end
      expect_true(cyc == 910_997, $sformatf("run took %0d clocks", cyc));
      for (int d = 0; d < ND; d++) begin
        expect_true(done[d], $sformatf("d%0d done", d));
        ref_out = forward(img, tgt[d], exp_offset(d, n));
        for (int i = 0; i < 10; i++) begin
          checks++;
          if (int'(logits[d][i]) != ref_out[i]) begin
            failures++;
            $display("FAIL image %0d d%0d out %0d: got %0d exp %0d", n, d, i, logits[d][i], ref_out[i]);
          end
        end
        expect_true(int'(class_id[d]) == argmax(ref_out), $sformatf("d%0d image %0d class", d, n));
        if (d > 0 && class_id[d] != class_id[0]) n_class_changed++;
      end
      $display("image %0d: digit clean %0d, fmap-G %0d, weight-S %0d, bias-G %0d, fmap-S %0d",
               n, class_id[0], class_id[1], class_id[2], class_id[3], class_id[4]);
      @(negedge clk);
      expect_true(!busy[0] && !done[0], "idle after done");
    end
    $display("mechanisms: gdat steps %0d, gdat saturated %0d, sdat armed %0d, weight site %0d, bias site %0d, fmap site %0d, busy writes %0d, digits changed %0d",
             n_gdat_step, n_gdat_sat, n_sdat_arm, n_site_w, n_site_b, n_site_fm, n_busy_write,
             n_class_changed);
    expect_true(n_gdat_step > 0, "gradual step never happened");
    expect_true(n_gdat_sat > 0, "gradual saturation never happened");
    expect_true(n_sdat_arm >= 2, "sudden arming never happened");
    expect_true(n_site_w > 0, "weight site never altered a word");
    expect_true(n_site_b > 0, "bias site never altered a word");
    expect_true(n_site_fm == 196 * (NIMG - 1), $sformatf("fmap site altered %0d words", n_site_fm));
    expect_true(n_busy_write > 0, "write during a run never tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
