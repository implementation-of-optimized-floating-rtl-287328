// fpas: decimal floating point adder/subtractor (decimal64, 16 digits).
//
// Datapath, all combinational:
//   1. eop = As ^ Bs: 0 means the magnitudes are added, 1 subtracted. For
//      a subtraction the caller has already inverted Bs.
//   2. The exponent comparator sets swap when Ae < Be and gives the right
//      shift amount RSA = |Ae - Be| in digits.
//   3. Swapping logic puts the operand with the larger exponent on the L
//      channel (Ls, Le, Lm) and the other one on the S channel.
//   4. A right barrel shifter aligns Sm by RSA digits (Srsm). Digits shifted
//      out are dropped: operands are not pre-normalised and no guard digits
//      are kept, so alignment truncates.
//   5. A 17-digit BCD adder/subtractor forms Lm + Srsm or Lm - Srsm. When
//      subtracting and Srsm > Lm the two inputs are exchanged so that the
//      difference is never negative, and the result takes the sign of S.
//   6. Round logic: if the 17th digit of the sum is non-zero the sum is
//      truncated to its top 16 digits and the exponent is incremented by a
//      3-digit BCD adder; otherwise the low 16 digits are the result.
//   7. Sign: the sign of the operand of greater magnitude (Ls, or Ss in the
//      exchanged case of step 5).
// An exponent incremented past 767 gives infinity with the overflow flag.
// NaN inputs give NaN; infinity plus a finite number gives that infinity;
// infinities of opposite effective sign give NaN.
// Steps 1-4 and 6 follow the design; the exchange of adder inputs for
// negative differences, overflow to infinity and the special-value rules
// are this design's choices.
module fpas
  import dfp_pkg::*;
(
  input  dfp_num_t   a,
  input  dfp_class_e a_cls,
  input  dfp_num_t   b,
  input  dfp_class_e b_cls,
  output dfp_num_t   r,
  output dfp_class_e r_cls,
  output dfp_flags_t flags
);
  logic        eop;
  logic        swap;
  logic [11:0] rsa_bcd_unused;
  logic [4:0]  rsa;
  dfp_num_t    l_num, s_num;
  logic [63:0] srsm;
  logic        mag_swap;
  logic [67:0] add_a, add_b, rm17;
  logic        cout_unused;
  logic        inc;
  logic [63:0] rm;
  logic [11:0] re;
  logic        re_carry;
  logic        rs;
  logic        ovf;

  assign eop = a.sign ^ b.sign;

  fpas_comparator u_cmp (.ae(a.exp), .be(b.exp), .swap(swap), .rsa_bcd(rsa_bcd_unused), .rsa(rsa));

  // swapping logic
  assign l_num = swap ? b : a;
  assign s_num = swap ? a : b;

  bcd_rshift #(.NDIG(16), .SHW(5)) u_shift (.din(s_num.mant), .shamt(rsa), .dout(srsm));

  assign mag_swap = eop && (srsm > l_num.mant);
  assign add_a    = mag_swap ? {4'd0, srsm} : {4'd0, l_num.mant};
  assign add_b    = mag_swap ? {4'd0, l_num.mant} : {4'd0, srsm};

  bcd_addsub #(.NDIG(17)) u_addsub (.a(add_a), .b(add_b), .sub(eop), .s(rm17), .cout(cout_unused));

  // round logic: truncate the 17-digit sum to 16 digits
  assign inc = rm17[67:64] != 4'd0;
  assign rm  = inc ? rm17[67:4] : rm17[63:0];

  // exponent calculation: Re = Le (+1 after truncation)
  bcd_addsub #(.NDIG(3)) u_expinc (.a(l_num.exp), .b({11'd0, inc}), .sub(1'b0), .s(re), .cout(re_carry));
  assign ovf = re_carry || (re > EMAX_BCD);

  // sign calculation
  assign rs = mag_swap ? s_num.sign : l_num.sign;

  always_comb begin
    r     = '0;
    r_cls = DFP_FINITE;
    flags = '0;
    if (a_cls == DFP_NAN || b_cls == DFP_NAN) begin
      r_cls     = DFP_NAN;
      flags.nan = 1'b1;
    end else if (a_cls == DFP_INF && b_cls == DFP_INF) begin
      r_cls      = eop ? DFP_NAN : DFP_INF;
      r.sign     = a.sign;
      flags.nan  = eop;
      flags.inf  = !eop;
    end else if (a_cls == DFP_INF || b_cls == DFP_INF) begin
      r_cls     = DFP_INF;
      r.sign    = (a_cls == DFP_INF) ? a.sign : b.sign;
      flags.inf = 1'b1;
    end else if (ovf) begin
      r_cls     = DFP_INF;
      r.sign    = rs;
      flags.inf = 1'b1;
      flags.of  = 1'b1;
    end else begin
      r.sign     = rs;
      r.exp      = re;
      r.mant     = rm;
      flags.zero = (rm == '0);
    end
  end
endmodule
