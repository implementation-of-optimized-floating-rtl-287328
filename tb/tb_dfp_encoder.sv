// tb_dfp_encoder: drives random finite numbers, infinities and NaN into
// the encoder and compares the registered packet with the reference packer
// and with hand-encoded constants. Checks the one-cycle latency of
// out_valid and that the output holds while in_valid is low.
module tb_dfp_encoder;
  import dfp_pkg::*;
  import tb_dfp_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  dfp_num_t   num;
  dfp_class_e cls;
  dfp_flags_t flags_in, flags;
  logic [63:0] opkt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dfp_encoder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .num(num), .cls(cls),
                   .flags_in(flags_in), .out_valid(out_valid), .opkt(opkt), .flags(flags));

  task automatic send(bit s, int e, longint unsigned c, dfp_class_e k, logic [63:0] want);
    num.sign = s; num.exp = exp_to_bcd(e); num.mant = to_bcd(c); cls = k;
    flags_in = 5'($urandom_range(0, 31));
    in_valid = 1;
    @(posedge clk);
    #1;
    checks++;
    if (!out_valid || opkt != want || flags != flags_in) begin
      failures++;
      $display("FAIL s=%0b e=%0d c=%0d cls=%0d -> v=%0b %h (want %h)", s, e, c, k, out_valid, opkt, want);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    num = '0; cls = DFP_FINITE; flags_in = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (out_valid || opkt != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    @(negedge clk);
    send(0, 398, 1, DFP_FINITE, 64'h2238_0000_0000_0001);
    send(1, 398, 1, DFP_FINITE, 64'hA238_0000_0000_0001);
    send(0, 767, TEN16 - 1, DFP_FINITE, 64'h77FC_FF3F_CFF3_FCFF);
    send(0, 0, 0, DFP_FINITE, 64'h0);
    send(1, 0, 0, DFP_INF, 64'hF800_0000_0000_0000);
    send(1, 0, 0, DFP_NAN, 64'h7C00_0000_0000_0000);
    for (int n = 0; n < 2000; n++) begin
      longint unsigned c;
      int e;
      bit s;
      c = rand_coeff(); e = $urandom_range(0, EMAX); s = 1'($urandom_range(0, 1));
      send(s, e, c, DFP_FINITE, pack(s, e, c, CLS_FIN));
    end
    // hold: with in_valid low the packet stays and out_valid drops after one cycle
    begin
      logic [63:0] last;
      last = opkt;
      in_valid = 0;
      num = '1;
      @(posedge clk); #1;
      checks++;
      if (out_valid || opkt != last) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
