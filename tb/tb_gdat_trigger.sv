// tb_gdat_trigger: with a 3-bit counter and payload 5 the offset must step by
// one every 8 samples and stop at 5; idle clocks between samples change
// nothing, and reset returns the offset to zero.
module tb_gdat_trigger;
  import lenet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, sample = 0;
  q_t offset;

  gdat_trigger #(.CNT_W(3), .PAYLOAD(16'sd5)) u_dut (.clk, .rst_n, .sample_done(sample), .offset);

  task automatic expect_off(int n);
    int e;
    e = (n / 8 > 5) ? 5 : n / 8;
    checks++;
    if (offset !== q_t'(e)) begin
      failures++; $display("FAIL after %0d samples: offset %0d exp %0d", n, offset, e);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_off(0);
    for (int n = 1; n <= 64; n++) begin
      sample = 1; @(negedge clk); sample = 0;
      repeat ($urandom_range(3)) @(negedge clk);
      expect_off(n);
    end
    rst_n = 0; @(negedge clk); rst_n = 1;
    expect_off(0);
    for (int n = 1; n <= 8; n++) begin sample = 1; @(negedge clk); end
    sample = 0;
    expect_off(8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
