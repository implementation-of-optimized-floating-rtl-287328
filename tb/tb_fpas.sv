// tb_fpas: random decoded operands through the adder/subtractor, compared
// with the reference adder. Exponent pairs are drawn equal, close and far
// apart, and special values are mixed in, so that swapping, truncating
// alignment, the carry into the 17th digit, negative differences and
// exponent overflow all occur; each is counted and must happen.
module tb_fpas;
  import dfp_pkg::*;
  import tb_dfp_ref_pkg::*;
  dfp_num_t   a, b, r;
  dfp_class_e ac, bc, rc;
  dfp_flags_t flags;
  int checks = 0, failures = 0;
  int n_swap = 0, n_trunc = 0, n_round = 0, n_neg = 0, n_of = 0, n_special = 0;

  fpas dut (.a(a), .a_cls(ac), .b(b), .b_cls(bc), .r(r), .r_cls(rc), .flags(flags));

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
    for (int n = 0; n < 20000; n++) begin
      bit sa, sb;
      int ea, eb, ca_k, cb_k;
      longint unsigned ma, mb;
      ref_res_t e;
      sa = 1'($urandom_range(0, 1)); sb = 1'($urandom_range(0, 1));
      ea = $urandom_range(0, EMAX);
      case (n % 4)
        0: eb = ea;
        1: eb = $urandom_range(0, EMAX);
        default: eb = ea + $urandom_range(0, 20) - 10;
      endcase
      if (eb < 0) eb = 0;
      if (eb > EMAX) eb = EMAX;
      ma = rand_coeff(); mb = rand_coeff();
      ca_k = rnd_cls(); cb_k = rnd_cls();
      if (n == 0) begin ea = EMAX; eb = EMAX; ma = TEN16 - 1; mb = TEN16 - 1; sa = 0; sb = 0; ca_k = CLS_FIN; cb_k = CLS_FIN; end
      a.sign = sa; a.exp = (ca_k == CLS_FIN) ? exp_to_bcd(ea) : '0; a.mant = (ca_k == CLS_FIN) ? to_bcd(ma) : '0;
      b.sign = sb; b.exp = (cb_k == CLS_FIN) ? exp_to_bcd(eb) : '0; b.mant = (cb_k == CLS_FIN) ? to_bcd(mb) : '0;
      ac = dfp_class_e'(ca_k); bc = dfp_class_e'(cb_k);
      if (ca_k != CLS_FIN) begin ea = 0; ma = 0; end
      if (cb_k != CLS_FIN) begin eb = 0; mb = 0; end
      #1;
      e = add(sa, ea, ma, ca_k, sb, eb, mb, cb_k);
      checks++;
      if (rc != dfp_class_e'(e.cls) || flags != e.flags ||
          (e.cls == CLS_FIN && (r.sign != e.sign || r.exp != exp_to_bcd(e.exp) || r.mant != to_bcd(e.coeff))) ||
          (e.cls == CLS_INF && r.sign != e.sign)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %0b %0d %0d + %0b %0d %0d -> %0b %h %h cls=%0d fl=%b (want %0b %0d %0d cls=%0d fl=%b)",
                   sa, ea, ma, sb, eb, mb, r.sign, r.exp, r.mant, rc, flags, e.sign, e.exp, e.coeff, e.cls, e.flags);
      end
      if (e.cls == CLS_FIN) begin
        n_swap  += int'(e.swapped);
        n_trunc += int'(e.truncated_align);
        n_round += int'(e.rounded);
        n_neg   += int'(e.mag_swapped);
      end else n_special++;
      n_of += int'(e.flags[F_OF]);
    end
    $display("swap=%0d truncating-align=%0d round=%0d negative-diff=%0d overflow=%0d special=%0d",
             n_swap, n_trunc, n_round, n_neg, n_of, n_special);
    checks++;
    if (n_swap == 0 || n_trunc == 0 || n_round == 0 || n_neg == 0 || n_of == 0 || n_special == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
