// tb_mac_unit: runs random sums of 1 to 1,200 products with random biases
// through the unit, with and without ReLU, and compares the result with a
// 64-bit integer model of Q1.14 accumulate, bias add and wrap-around.
module tb_mac_unit;
  import lenet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, clear = 0, acc_en = 0, relu = 0;
  q_t a = '0, b = '0, bias = '0, result;

  mac_unit u_dut (.clk, .rst_n, .clear, .acc_en, .a, .b, .bias, .relu, .result);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic q_t model(longint acc, q_t bias_v, bit relu_v);
    longint s;
    q_t r;
    s = acc + (longint'(bias_v) * 16384);
    r = q_t'(s >>> 14);
    if (relu_v && r < 0) r = '0;
    return r;
  endfunction

  initial begin
    longint acc;
    int n, scale;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      clear = 1; @(negedge clk); clear = 0;
      n = (t < 10) ? t + 1 : $urandom_range(1200, 1);
      scale = $urandom_range(4);
      acc = 0;
      for (int i = 0; i < n; i++) begin
        acc_en = 1;
        a = q_t'($urandom) >>> scale;
        b = q_t'($urandom) >>> scale;
        acc += longint'(a) * longint'(b);
        @(negedge clk);
      end
      acc_en = 0;
      bias = q_t'($urandom);
      relu = $urandom_range(1);
      #1;
      checks++;
      if (result !== model(acc, bias, relu)) begin
        failures++;
        $display("FAIL sum of %0d: got %0d exp %0d", n, result, model(acc, bias, relu));
      end
      // the pooling use: four values times 0.25
    end
    clear = 1; @(negedge clk); clear = 0;
    acc = 0;
    for (int i = 0; i < 4; i++) begin
      acc_en = 1; a = q_t'($urandom_range(32767)); b = Q_QUARTER;
      acc += longint'(a) * 4096;
      @(negedge clk);
    end
    acc_en = 0; bias = '0; relu = 0; #1;
    checks++;
    if (result !== model(acc, '0, 0)) begin failures++; $display("FAIL pool"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
