// tb_weight_rom: reads every word of one group-A bank and a sample of one
// group-B bank and compares with the contents formula of lenet_pkg, checking
// the one-clock read latency and that the output holds while rd_en is low.
module tb_weight_rom;
  import lenet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a_en = 0, b_en = 0;
  logic [W_BANK_AW-1:0] a_addr = '0, b_addr = '0;
  q_t a_data, b_data;

  weight_rom #(.GRP(1'b0), .BANK(6), .DEPTH(W_GRPA_DEPTH)) u_a (
    .clk, .rd_en(a_en), .rd_addr(a_addr), .rd_data(a_data));
  weight_rom #(.GRP(1'b1), .BANK(3), .DEPTH(W_GRPB_DEPTH)) u_b (
    .clk, .rd_en(b_en), .rd_addr(b_addr), .rd_data(b_data));

  task automatic check(string what, q_t got, q_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < int'(W_GRPA_DEPTH); a++) begin
      a_en = 1; a_addr = W_BANK_AW'(a);
      @(negedge clk);
      check("A bank 6", a_data, weight_value(1'b0, a * 8 + 6));
    end
    // the Conv1 K15 W9 word must be the published -0.2501 (-4098)
    a_addr = 14'd16; @(negedge clk);
    check("A K15W9", a_data, -16'sd4098);
    a_en = 0; a_addr = 14'd3; @(negedge clk);
    check("A hold", a_data, -16'sd4098);
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = $urandom_range(W_GRPB_DEPTH - 1);
      b_en = 1; b_addr = W_BANK_AW'(a);
      @(negedge clk);
      check("B bank 3", b_data, weight_value(1'b1, a * 8 + 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
