// tb_dfp_decoder: decodes hand-encoded decimal64 constants (1, -1, the
// largest finite number, infinity, NaN) and random packets built by the
// reference packer, and checks sign, BCD exponent, BCD significand and
// class. Every one of the 1000 three-digit values is also taken through
// the trailing declets.
module tb_dfp_decoder;
  import dfp_pkg::*;
  import tb_dfp_ref_pkg::*;
  logic [63:0] pkt;
  dfp_num_t    num;
  dfp_class_e  cls;
  int checks = 0, failures = 0;

  dfp_decoder dut (.pkt(pkt), .num(num), .cls(cls));

  task automatic expect_num(logic [63:0] p, bit s, int e, longint unsigned c, dfp_class_e ecls);
    pkt = p;
    #1;
    checks++;
    if (cls != ecls || (ecls == DFP_FINITE &&
        (num.sign != s || num.exp != exp_to_bcd(e) || num.mant != to_bcd(c)))) begin
      failures++;
      $display("FAIL %h -> s=%0b e=%h m=%h cls=%0d (want %0b %0d %0d %0d)",
               p, num.sign, num.exp, num.mant, cls, s, e, c, ecls);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_num(64'h2238_0000_0000_0001, 0, 398, 1, DFP_FINITE);
    expect_num(64'hA238_0000_0000_0001, 1, 398, 1, DFP_FINITE);
    expect_num(64'h77FC_FF3F_CFF3_FCFF, 0, 767, TEN16 - 1, DFP_FINITE);
    expect_num(64'h0000_0000_0000_0000, 0, 0, 0, DFP_FINITE);
    expect_num(64'h7800_0000_0000_0000, 0, 0, 0, DFP_INF);
    expect_num(64'hF800_0000_0000_0000, 1, 0, 0, DFP_INF);
    expect_num(64'h7C00_0000_0000_0000, 0, 0, 0, DFP_NAN);
    for (int v = 0; v < 1000; v++) begin
      longint unsigned c;
      c = longint'(v) * 64'd1_000_001_000_001 + 64'(v % 10) * 64'd1_000_000_000_000_000;
      expect_num(pack(1'(v % 2), v % 768, c, CLS_FIN), 1'(v % 2), v % 768, c, DFP_FINITE);
    end
    for (int n = 0; n < 2000; n++) begin
      longint unsigned c;
      int e;
      bit s;
      c = rand_coeff(); e = $urandom_range(0, EMAX); s = 1'($urandom_range(0, 1));
      expect_num(pack(s, e, c, CLS_FIN), s, e, c, DFP_FINITE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
