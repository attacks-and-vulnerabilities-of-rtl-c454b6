// tb_fmap_ram: writes random words to random addresses of a 196-word RAM
// while reading others, and checks every read (one clock latency, old data
// on a same-cycle read and write) against a shadow array.
module tb_fmap_ram;
  import lenet_pkg::*;
  localparam int unsigned D = 196;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, re = 0;
  logic [FMAP_AW-1:0] wa = '0, ra = '0;
  q_t wd = '0, rd;
  q_t shadow [D];

  fmap_ram #(.DEPTH(D)) u_dut (.clk, .wr_en(we), .wr_addr(wa), .wr_data(wd),
                              .rd_en(re), .rd_addr(ra), .rd_data(rd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_t exp;
    @(negedge clk);
    for (int a = 0; a < int'(D); a++) begin
      we = 1; wa = FMAP_AW'(a); wd = q_t'($urandom); shadow[a] = wd;
      @(negedge clk);
    end
    for (int i = 0; i < 5000; i++) begin
      we = ($urandom_range(1) == 1); wa = FMAP_AW'($urandom_range(D - 1)); wd = q_t'($urandom);
      re = 1; ra = ($urandom_range(3) == 0) ? wa : FMAP_AW'($urandom_range(D - 1));
      exp = shadow[ra];
      if (we) shadow[wa] = wd;
      @(negedge clk);
      checks++;
      if (rd !== exp) begin failures++; $display("FAIL read %0d got %0d exp %0d", ra, rd, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
