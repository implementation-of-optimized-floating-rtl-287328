// fpm: decimal floating point multiplier (decimal64, 16 digits).
//
// Datapath, all combinational:
//   - Rs = As ^ Bs.
//   - A 16 x 16 digit parallel BCD multiplier forms the 32-digit product of
//     the significands.
//   - Round logic counts the leading zero digits lz of the product. If the
//     product has more than 16 significant digits it is shifted right by
//     k = 16 - lz digits with a barrel shifter, truncating the dropped
//     digits; otherwise k = 0. The low 16 digits are Rm.
//   - Exponent calculation in BCD: Re = Ae + Be + k - 398, with 4-digit BCD
//     adders and a 4-digit BCD subtractor for the bias.
//   - Flags: a negative Re is an underflow (the result becomes a zero of
//     sign Rs and exponent 0), Re above 767 an overflow (the result becomes
//     infinity of sign Rs). Zero is set for a zero significand. A NaN input,
//     or infinity times zero, gives NaN; infinity times a non-zero number
//     gives infinity.
// Sign, exponent formula, parallel multiplier and truncation follow the
// design; the leading-zero based shift and the exact flag rules are this
// design's choices.
module fpm
  import dfp_pkg::*;
#(
  parameter int unsigned N = P_DIGITS
) (
  input  dfp_num_t   a,
  input  dfp_class_e a_cls,
  input  dfp_num_t   b,
  input  dfp_class_e b_cls,
  output dfp_num_t   r,
  output dfp_class_e r_cls,
  output dfp_flags_t flags
);
  logic [8*N-1:0] prod;
  logic [5:0]     lz;
  logic [4:0]     k;
  logic [7:0]     k_bcd;
  logic [8*N-1:0] prod_sh;
  logic [63:0]    rm;
  logic           rs;
  logic [15:0]    esum1, esum2, ediff;
  logic           c1_unused, c2_unused, no_borrow;
  logic           uf, ovf;
  logic           a_zero, b_zero;

  assign rs = a.sign ^ b.sign;

  bcd_array_mult #(.N(N)) u_mul (.x(a.mant[4*N-1:0]), .y(b.mant[4*N-1:0]), .p(prod));

  // round logic: leading zero digits, then the digit shift k
  always_comb begin
    lz = 6'(2 * N);
    for (int d = 0; d < 2 * N; d++) begin
      if (prod[4*d +: 4] != 4'd0) lz = 6'(2 * N - 1 - d);
    end
    k = (lz >= 6'(N)) ? 5'd0 : 5'(6'(N) - lz);
    k_bcd = (k >= 5'd10) ? {4'd1, 4'(k - 5'd10)} : {4'd0, 4'(k)};
  end

  bcd_rshift #(.NDIG(2 * N), .SHW(5)) u_shift (.din(prod), .shamt(k), .dout(prod_sh));
  assign rm = 64'(prod_sh[4*N-1:0]);

  // exponent calculation: Ae + Be + k - bias
  bcd_addsub #(.NDIG(4)) u_eadd1 (.a({4'd0, a.exp}), .b({4'd0, b.exp}), .sub(1'b0), .s(esum1), .cout(c1_unused));
  bcd_addsub #(.NDIG(4)) u_eadd2 (.a(esum1), .b({8'd0, k_bcd}), .sub(1'b0), .s(esum2), .cout(c2_unused));
  bcd_addsub #(.NDIG(4)) u_ebias (.a(esum2), .b({4'd0, BIAS_BCD}), .sub(1'b1), .s(ediff), .cout(no_borrow));

  assign uf  = !no_borrow;
  assign ovf = no_borrow && (ediff > {4'd0, EMAX_BCD});

  assign a_zero = (a_cls == DFP_FINITE) && (a.mant == '0);
  assign b_zero = (b_cls == DFP_FINITE) && (b.mant == '0);

  always_comb begin
    r     = '0;
    r_cls = DFP_FINITE;
    flags = '0;
    if (a_cls == DFP_NAN || b_cls == DFP_NAN ||
        (a_cls == DFP_INF && b_zero) || (b_cls == DFP_INF && a_zero)) begin
      r_cls     = DFP_NAN;
      flags.nan = 1'b1;
    end else if (a_cls == DFP_INF || b_cls == DFP_INF) begin
      r_cls     = DFP_INF;
      r.sign    = rs;
      flags.inf = 1'b1;
    end else if (uf) begin
      r.sign     = rs;
      flags.uf   = 1'b1;
      flags.zero = 1'b1;
    end else if (ovf) begin
      r_cls     = DFP_INF;
      r.sign    = rs;
      flags.inf = 1'b1;
      flags.of  = 1'b1;
    end else begin
      r.sign     = rs;
      r.exp      = ediff[11:0];
      r.mant     = rm;
      flags.zero = (rm == '0);
    end
  end
endmodule
