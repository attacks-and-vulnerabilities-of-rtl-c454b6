// tb_trojan_inject: random address/data/offset vectors; the output must be
// data + offset (wrapping) exactly n_hit the match window with the site
// enabled, and the data unchanged otherwise.
module tb_trojan_inject;
  import lenet_pkg::*;
  int checks = 0, failures = 0;

  logic enable;
  logic [FMAP_AW-1:0] addr;
  q_t din, off, dout;

  trojan_inject #(.AW(FMAP_AW), .MATCH_LO(TGT_FM_LO), .MATCH_HI(TGT_FM_HI)) u_dut (
    .enable, .addr, .data_in(din), .offset(off), .data_out(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_t exp;
    int n_hit = 0;
    for (int t = 0; t < 20000; t++) begin
      enable = ($urandom_range(3) != 0);
      case ($urandom_range(3))
        0: addr = FMAP_AW'(TGT_FM_LO + $urandom_range(1) - 1);
        1: addr = FMAP_AW'(TGT_FM_HI + $urandom_range(1));
        2: addr = FMAP_AW'($urandom_range(TGT_FM_HI, TGT_FM_LO));
        default: addr = FMAP_AW'($urandom_range(16383));
      endcase
      din = q_t'($urandom); off = q_t'($urandom);
      #1;
      exp = din;
      if (enable && addr >= TGT_FM_LO && addr <= TGT_FM_HI) begin exp = q_t'(din + off); n_hit++; end
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL en %0b addr %0d: got %0d exp %0d", enable, addr, dout, exp);
      end
    end
    checks++;
    if (n_hit < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
