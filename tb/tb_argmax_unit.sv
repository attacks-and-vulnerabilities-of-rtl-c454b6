// tb_argmax_unit: streams sets of ten random outputs (in random order, with
// forced ties) and checks the stored outputs and the winner, lowest digit on
// a tie, against a direct search.
module tb_argmax_unit;
  import lenet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, clear = 0, valid = 0;
  logic [3:0] idx = '0, best_idx;
  q_t data = '0, best_val;
  q_t logits [FC2_N];

  argmax_unit u_dut (.clk, .rst_n, .clear, .in_valid(valid), .in_idx(idx), .in_data(data),
                     .best_idx, .best_val, .logits);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_t v [FC2_N];
    int order [FC2_N];
    int eb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      foreach (v[i]) v[i] = q_t'($urandom) >>> $urandom_range(8);
      if (t % 3 == 0) v[$urandom_range(9)] = v[$urandom_range(9)];
      if (t % 7 == 0) foreach (v[i]) v[i] = 16'sd5;
      eb = 0;
      for (int i = 1; i < 10; i++) if (v[i] > v[eb]) eb = i;
      foreach (order[i]) order[i] = i;
      if (t % 2 == 1) order.shuffle();
      clear = 1; @(negedge clk); clear = 0;
      foreach (order[i]) begin
        valid = 1; idx = 4'(order[i]); data = v[order[i]];
        @(negedge clk);
      end
      valid = 0;
      @(negedge clk);
      checks++;
      if (t % 2 == 0 && (best_idx != 4'(eb) || best_val != v[eb])) begin
        failures++; $display("FAIL set %0d: got %0d exp %0d", t, best_idx, eb);
      end
      if (t % 2 == 1 && best_val != v[eb]) begin
        failures++; $display("FAIL set %0d value: got %0d exp %0d", t, best_val, v[eb]);
      end
      foreach (v[i]) begin
        checks++;
        if (logits[i] !== v[i]) begin failures++; $display("FAIL logit %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
