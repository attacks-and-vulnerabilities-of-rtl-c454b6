// tb_bias_rom: reads all 122 biases in random order and checks the data, the
// returned index and the one-clock latency against lenet_pkg::bias_value.
module tb_bias_rom;
  import lenet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 0;
  logic [B_IDX_W-1:0] idx = '0, idx_q;
  q_t data;

  bias_rom u_dut (.clk, .rd_en(en), .rd_idx(idx), .rd_data(data), .rd_idx_q(idx_q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [B_WORDS];
    for (int i = 0; i < int'(B_WORDS); i++) order[i] = i;
    order.shuffle();
    @(negedge clk);
    foreach (order[i]) begin
      en = 1; idx = B_IDX_W'(order[i]);
      @(negedge clk);
      checks++;
      if (data !== bias_value(order[i]) || idx_q !== B_IDX_W'(order[i])) begin
        failures++;
        $display("FAIL bias %0d: got %0d (idx %0d)", order[i], data, idx_q);
      end
    end
    en = 1; idx = 7'd14; @(negedge clk);
    checks++;
    if (data !== 16'sd526) begin failures++; $display("FAIL K15 bias %0d", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
