// tb_layer_ctrl: runs the sequencer through one whole image and checks every
// issued tap (source memory, feature-map address, weight group and index,
// bias index) and every write (destination, address) against loop nests
// written out layer by layer in the testbench, plus the mac_en and done
// timing and the total of 910,996 clocks from start to done.
module tb_layer_ctrl;
  import lenet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, start = 0;
  logic busy, done, rd_en, w_en, w_grp, b_en, mac_clear, mac_en, pool, relu, use_bias, wr_en;
  layer_e layer;
  fmap_e rd_src, wr_dst;
  logic [FMAP_AW-1:0] rd_addr, wr_addr;
  logic [W_IDX_W-1:0] w_idx;
  logic [B_IDX_W-1:0] b_idx;
  logic [6:0] wr_oc;

  layer_ctrl u_dut (.clk, .rst_n, .start, .busy, .done, .layer, .rd_en, .rd_src, .rd_addr,
                    .w_en, .w_grp, .w_idx, .b_en, .b_idx, .mac_clear, .mac_en, .pool, .relu,
                    .use_bias, .wr_en, .wr_dst, .wr_addr, .wr_oc);

  typedef struct {
    int src; int addr; int wen; int grp; int widx; int bidx;
  } tap_t;
  typedef struct { int dst; int addr; } wr_t;
  tap_t taps [$];
  wr_t  wrs  [$];

  // conv: square input of width iw, ic input channels, oc kernels k x k
  task automatic gen_conv(int src, int dst, int iw, int ic, int oc, int k, int wbase,
                          int bbase, int grp);
    int ow;
    ow = iw - k + 1;
    for (int o = 0; o < oc; o++)
      for (int y = 0; y < ow; y++)
        for (int x = 0; x < ow; x++) begin
          for (int c = 0; c < ic; c++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++)
                taps.push_back('{src, c*iw*iw + (y+ky)*iw + x+kx, 1, grp,
                                 wbase + ((o*ic + c)*k + ky)*k + kx, bbase + o});
          wrs.push_back('{dst, o*ow*ow + y*ow + x});
        end
  endtask

  task automatic gen_pool(int src, int dst, int iw, int ch);
    int ow;
    ow = iw / 2;
    for (int c = 0; c < ch; c++)
      for (int y = 0; y < ow; y++)
        for (int x = 0; x < ow; x++) begin
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              taps.push_back('{src, c*iw*iw + (2*y+dy)*iw + 2*x+dx, 0, -1, -1, -1});
          wrs.push_back('{dst, c*ow*ow + y*ow + x});
        end
  endtask

  task automatic gen_fc(int src, int dst, int nin, int nout, int wbase, int bbase, int grp);
    for (int n = 0; n < nout; n++) begin
      for (int i = 0; i < nin; i++)
        taps.push_back('{src, i, 1, grp, wbase + n*nin + i, bbase + n});
      wrs.push_back('{dst, n});
    end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycles = 0, rd_prev = 0, ntaps = 0, nwr = 0, ndone = 0, tap_fail = 0;
  bit running = 0;

  always @(posedge clk) if (running) begin
    cycles++;
    // mac_en follows the tap by one clock
    if ((mac_en !== rd_prev[0]) && tap_fail < 10) begin
      tap_fail++; failures++; $display("FAIL mac_en timing at cycle %0d", cycles);
    end
    rd_prev = int'(rd_en);
    if (rd_en) begin
      tap_t e;
      ntaps++;
      if (taps.size() == 0) begin failures++; $display("FAIL extra tap"); end
      else begin
        e = taps.pop_front();
        if (int'(rd_src) != e.src || int'(rd_addr) != e.addr || int'(w_en) != e.wen ||
            (e.wen == 1 && (int'(w_grp) != e.grp || int'(w_idx) != e.widx ||
                            int'(b_idx) != e.bidx || !b_en)) ||
            int'(pool) != (1 - e.wen)) begin
          failures++;
          if (tap_fail++ < 10)
            $display("FAIL tap %0d: src %0d addr %0d w %0d/%0d exp src %0d addr %0d w %0d/%0d",
                     ntaps, rd_src, rd_addr, w_en, w_idx, e.src, e.addr, e.wen, e.widx);
        end
      end
    end
    if (wr_en) begin
      wr_t e;
      nwr++;
      checks++;
      if (!mac_clear) begin failures++; $display("FAIL no clear on write"); end
      if (wrs.size() == 0) begin failures++; $display("FAIL extra write"); end
      else begin
        e = wrs.pop_front();
        if (int'(wr_dst) != e.dst || int'(wr_addr) != e.addr) begin
          failures++;
          if (tap_fail++ < 10)
            $display("FAIL write %0d: dst %0d addr %0d exp %0d %0d", nwr, wr_dst, wr_addr,
                     e.dst, e.addr);
        end
      end
    end
    if (done) ndone++;
  end

  initial begin
    int total;
    gen_conv(int'(M_IN), int'(M_C1), 30, 1, 16, 3, 0, 0, 0);
    gen_pool(int'(M_C1), int'(M_P1), 28, 16);
    gen_conv(int'(M_P1), int'(M_C2), 14, 16, 32, 3, 144, 16, 0);
    gen_pool(int'(M_C2), int'(M_P2), 12, 32);
    gen_fc(int'(M_P2), int'(M_F1), 1152, 64, 0, 48, 1);
    gen_fc(int'(M_F1), int'(M_F2), 64, 10, 4752, 112, 0);
    total = taps.size();
    $display("expected taps %0d, writes %0d", total, wrs.size());
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after reset"); end
    start = 1; running = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (cycles != 910_997) begin failures++; $display("FAIL cycles %0d", cycles); end
    checks++;
    if (ntaps != total || taps.size() != 0 || wrs.size() != 0) begin
      failures++; $display("FAIL taps %0d of %0d, %0d writes left", ntaps, total, wrs.size());
    end
    checks += ntaps;
    repeat (5) @(negedge clk);
    checks++;
    if (ndone != 1 || busy) begin failures++; $display("FAIL done pulses %0d busy %0b", ndone, busy); end
    $display("cycles from start to done: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
