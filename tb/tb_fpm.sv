// tb_fpm: random decoded operands through the multiplier, compared with the
// reference multiplier (128-bit product, truncation to 16 digits, exponent
// Ae + Be + shift - 398). Counts products that needed the rounding shift,
// exponent overflow and underflow, zero results and special values; each
// must occur.
module tb_fpm;
  import dfp_pkg::*;
  import tb_dfp_ref_pkg::*;
  dfp_num_t   a, b, r;
  dfp_class_e ac, bc, rc;
  dfp_flags_t flags;
  int checks = 0, failures = 0;
  int n_round = 0, n_of = 0, n_uf = 0, n_zero = 0, n_special = 0;

  fpm dut (.a(a), .a_cls(ac), .b(b), .b_cls(bc), .r(r), .r_cls(rc), .flags(flags));

  function automatic int rnd_cls();
    int t = $urandom_range(0, 49);
    return (t == 0) ? CLS_NAN : (t < 3) ? CLS_INF : CLS_FIN;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      bit sa, sb;
      int ea, eb, ca_k, cb_k;
      longint unsigned ma, mb;
      ref_res_t e;
      sa = 1'($urandom_range(0, 1)); sb = 1'($urandom_range(0, 1));
      ea = $urandom_range(0, EMAX); eb = $urandom_range(0, EMAX);
      if (n % 2 == 0) begin ea = 398 + $urandom_range(0, 40) - 20; eb = 398 + $urandom_range(0, 40) - 20; end
      ma = rand_coeff(); mb = rand_coeff();
      if (n % 50 == 1) ma = 0;
      ca_k = rnd_cls(); cb_k = rnd_cls();
      if (ca_k != CLS_FIN) begin ea = 0; ma = 0; end
      if (cb_k != CLS_FIN) begin eb = 0; mb = 0; end
      if (n == 0) begin ea = EMAX; eb = EMAX; ma = TEN16 - 1; mb = TEN16 - 1; ca_k = CLS_FIN; cb_k = CLS_FIN; end
      a.sign = sa; a.exp = exp_to_bcd(ea); a.mant = to_bcd(ma);
      b.sign = sb; b.exp = exp_to_bcd(eb); b.mant = to_bcd(mb);
      ac = dfp_class_e'(ca_k); bc = dfp_class_e'(cb_k);
      #1;
      e = mul(sa, ea, ma, ca_k, sb, eb, mb, cb_k);
      checks++;
      if (rc != dfp_class_e'(e.cls) || flags != e.flags ||
          (e.cls == CLS_FIN && (r.sign != e.sign || r.exp != exp_to_bcd(e.exp) || r.mant != to_bcd(e.coeff))) ||
          (e.cls == CLS_INF && r.sign != e.sign)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %0b %0d %0d * %0b %0d %0d -> %0b %h %h cls=%0d fl=%b (want %0b %0d %0d cls=%0d fl=%b)",
                   sa, ea, ma, sb, eb, mb, r.sign, r.exp, r.mant, rc, flags, e.sign, e.exp, e.coeff, e.cls, e.flags);
      end
      n_round   += int'(e.rounded && e.cls == CLS_FIN && !e.flags[F_UF]);
      n_of      += int'(e.flags[F_OF]);
      n_uf      += int'(e.flags[F_UF]);
      n_zero    += int'(e.flags[F_ZERO] && !e.flags[F_UF]);
      n_special += int'(ca_k != CLS_FIN || cb_k != CLS_FIN);
    end
    $display("round-shift=%0d overflow=%0d underflow=%0d zero=%0d special=%0d",
             n_round, n_of, n_uf, n_zero, n_special);
    checks++;
    if (n_round == 0 || n_of == 0 || n_uf == 0 || n_zero == 0 || n_special == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
