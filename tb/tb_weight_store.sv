// tb_weight_store: random reads over both weight groups compared with the
// contents formula; the trojan site is enabled and its offset changed, and
// only the Conv1 kernel 15 weight 9 word (group A, index 134) may move.
module tb_weight_store;
  import lenet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, hits = 0;

  logic en = 0, grp = 0;
  logic [W_IDX_W-1:0] idx = '0;
  q_t data, offset = '0;

  weight_store #(.TROJAN_EN(1'b1)) u_dut (.clk, .rd_en(en), .rd_grp(grp), .rd_idx(idx),
                                         .rd_data(data), .trojan_offset(offset));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i;
    bit g;
    q_t exp;
    @(negedge clk);
    for (int t = 0; t < 20000; t++) begin
      g = $urandom_range(1);
      if (t % 10 == 0) begin g = 0; i = TGT_W_INDEX + $urandom_range(2) * 8 - 8; end
      else i = g ? $urandom_range(W_GRPB_WORDS - 1) : $urandom_range(W_GRPA_WORDS - 1);
      if (t % 500 == 0) offset = q_t'($urandom_range(22320));
      en = 1; grp = g; idx = W_IDX_W'(i);
      exp = weight_value(g, i);
      if (!g && i == int'(TGT_W_INDEX)) begin exp = q_t'(exp + offset); hits++; end
      @(negedge clk);
      checks++;
      if (data !== exp) begin
        failures++;
        $display("FAIL grp %0d idx %0d: got %0d exp %0d", g, i, data, exp);
      end
    end
    // the group-B word at the same bank/address is not a target
    en = 1; grp = 1; idx = W_IDX_W'(TGT_W_INDEX); offset = 16'sd100; @(negedge clk);
    checks++;
    if (data !== weight_value(1'b1, TGT_W_INDEX)) begin failures++; $display("FAIL grp B alias"); end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL target never read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
