// tb_sdat_trigger: with a 5-bit counter and activation at 20 samples the
// offset must be 0 for the first 19 samples and the payload from the 20th
// on, and stay there for many more samples (the counter must not wrap back).
module tb_sdat_trigger;
  import lenet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, sample = 0;
  q_t offset;

  sdat_trigger #(.CNT_W(5), .ACTIVATE(20), .PAYLOAD(PAYLOAD_BIAS)) u_dut (
    .clk, .rst_n, .sample_done(sample), .offset);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n <= 100; n++) begin
      checks++;
      if (offset !== ((n >= 20) ? PAYLOAD_BIAS : q_t'(0))) begin
        failures++; $display("FAIL after %0d samples: offset %0d", n, offset);
      end
      sample = 1; @(negedge clk); sample = 0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    rst_n = 0; @(negedge clk); rst_n = 1;
    checks++;
    if (offset !== '0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
