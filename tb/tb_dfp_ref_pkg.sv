// tb_dfp_ref_pkg: reference arithmetic for the decimal64 testbenches.
//
// Everything here works on plain binary integers (significands as 64-bit
// or 128-bit unsigned numbers, exponents as int) and converts to BCD and
// to decimal64 DPD packets itself, so the expected values do not depend on
// the design under test. The rules mirror the unit's documented behaviour:
// alignment and rounding truncate, subtraction results take the sign of the
// larger magnitude, overflow gives infinity and underflow a zero.
package tb_dfp_ref_pkg;

  localparam int BIAS = 398;
  localparam int EMAX = 767;
  localparam longint unsigned TEN16 = 64'd10_000_000_000_000_000;

  localparam int CLS_FIN = 0;
  localparam int CLS_INF = 1;
  localparam int CLS_NAN = 2;

  // flag bit positions: {inf, nan, zero, of, uf}
  localparam int F_INF = 4, F_NAN = 3, F_ZERO = 2, F_OF = 1, F_UF = 0;

  typedef struct {
    bit               sign;
    int               exp;     // biased, binary
    longint unsigned  coeff;   // < 10^16
    int               cls;
    bit [4:0]         flags;
    // which internal mechanisms the operation exercised
    bit               swapped, truncated_align, rounded, mag_swapped;
  } ref_res_t;

  function automatic longint unsigned pow10(int n);
    longint unsigned v = 1;
    for (int i = 0; i < n; i++) v = v * 10;
    return v;
  endfunction

  function automatic logic [63:0] to_bcd(longint unsigned v);
    logic [63:0] r = '0;
    for (int i = 0; i < 16; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [127:0] to_bcd128(logic [127:0] v);
    logic [127:0] r = '0;
    for (int i = 0; i < 32; i++) begin
      r[4*i +: 4] = 4'(v % 128'd10);
      v = v / 128'd10;
    end
    return r;
  endfunction

  function automatic logic [11:0] exp_to_bcd(int e);
    return {4'(e / 100), 4'((e / 10) % 10), 4'(e % 10)};
  endfunction

  function automatic int digits_of(longint unsigned v);
    int n = 0;
    while (v != 0) begin n++; v = v / 10; end
    return n;
  endfunction

  // random significand with a random number of digits (0..16)
  function automatic longint unsigned rand_coeff();
    int nd = $urandom_range(0, 16);
    longint unsigned v = 0;
    if ($urandom_range(0, 3) == 0) nd = 16;
    for (int i = 0; i < nd; i++) v = v * 10 + longint'($urandom_range(0, 9));
    return v;
  endfunction

  // DPD encoding of three decimal digits (IEEE 754-2008, canonical)
  function automatic logic [9:0] dpd_of(int d2, int d1, int d0);
    bit [3:0] a = 4'(d2), e = 4'(d1), i = 4'(d0);
    bit large2 = d2 > 7, large1 = d1 > 7, large0 = d0 > 7;
    case ({large2, large1, large0})
      3'b000: return {a[2:0], e[2:0], 1'b0, i[2:0]};
      3'b001: return {a[2:0], e[2:0], 1'b1, 2'b00, i[0]};
      3'b010: return {a[2:0], i[2:1], e[0], 1'b1, 2'b01, i[0]};
      3'b011: return {a[2:0], 2'b10, e[0], 1'b1, 2'b11, i[0]};
      3'b100: return {i[2:1], a[0], e[2:0], 1'b1, 2'b10, i[0]};
      3'b101: return {e[2:1], a[0], 2'b01, e[0], 1'b1, 2'b11, i[0]};
      3'b110: return {i[2:1], a[0], 2'b00, e[0], 1'b1, 2'b11, i[0]};
      default: return {2'b00, a[0], 2'b11, e[0], 1'b1, 2'b11, i[0]};
    endcase
  endfunction

  function automatic logic [63:0] pack(bit sign, int exp, longint unsigned coeff, int cls);
    int d [16];
    logic [49:0] trail;
    logic [9:0]  eb;
    longint unsigned v = coeff;
    if (cls == CLS_NAN) return 64'h7C00_0000_0000_0000;
    if (cls == CLS_INF) return {sign, 5'b11110, 58'd0};
    for (int k = 0; k < 16; k++) begin d[k] = int'(v % 10); v = v / 10; end
    for (int k = 0; k < 5; k++) trail[10*k +: 10] = dpd_of(d[3*k+2], d[3*k+1], d[3*k]);
    eb = 10'(exp);
    if (d[15] >= 8) return {sign, 2'b11, eb[9:8], 1'(d[15] & 1), eb[7:0], trail};
    else            return {sign, eb[9:8], 3'(d[15]), eb[7:0], trail};
  endfunction

  function automatic ref_res_t add(bit as, int ae, longint unsigned ac, int acls,
                                   bit bs, int be, longint unsigned bc, int bcls);
    ref_res_t r;
    bit eop = as ^ bs;
    bit ls, ss;
    int le, se, d;
    longint unsigned lc, sc, srs, sum;
    r = '{default: 0};
    if (acls == CLS_NAN || bcls == CLS_NAN) begin
      r.cls = CLS_NAN; r.flags[F_NAN] = 1; return r;
    end
    if (acls == CLS_INF && bcls == CLS_INF) begin
      if (eop) begin r.cls = CLS_NAN; r.flags[F_NAN] = 1; end
      else begin r.cls = CLS_INF; r.sign = as; r.flags[F_INF] = 1; end
      return r;
    end
    if (acls == CLS_INF || bcls == CLS_INF) begin
      r.cls = CLS_INF; r.sign = (acls == CLS_INF) ? as : bs; r.flags[F_INF] = 1; return r;
    end
    r.swapped = ae < be;
    if (r.swapped) begin ls = bs; le = be; lc = bc; ss = as; se = ae; sc = ac; end
    else           begin ls = as; le = ae; lc = ac; ss = bs; se = be; sc = bc; end
    d   = le - se;
    srs = (d >= 17) ? 0 : sc / pow10(d);
    r.truncated_align = (srs * pow10(d > 16 ? 0 : d) != sc) || (d > 16 && sc != 0);
    if (!eop) begin sum = lc + srs; r.sign = ls; end
    else if (srs > lc) begin sum = srs - lc; r.sign = ss; r.mag_swapped = 1; end
    else begin sum = lc - srs; r.sign = ls; end
    r.exp = le;
    if (sum >= TEN16) begin sum = sum / 10; r.exp = le + 1; r.rounded = 1; end
    if (r.exp > EMAX) begin
      r.cls = CLS_INF; r.flags[F_INF] = 1; r.flags[F_OF] = 1; r.exp = 0; return r;
    end
    r.cls = CLS_FIN; r.coeff = sum; r.flags[F_ZERO] = (sum == 0);
    return r;
  endfunction

  function automatic ref_res_t mul(bit as, int ae, longint unsigned ac, int acls,
                                   bit bs, int be, longint unsigned bc, int bcls);
    ref_res_t r;
    logic [127:0] p;
    int k = 0;
    bit az = (acls == CLS_FIN) && ac == 0;
    bit bz = (bcls == CLS_FIN) && bc == 0;
    r = '{default: 0};
    r.sign = as ^ bs;
    if (acls == CLS_NAN || bcls == CLS_NAN || (acls == CLS_INF && bz) || (bcls == CLS_INF && az)) begin
      r.sign = 0; r.cls = CLS_NAN; r.flags[F_NAN] = 1; return r;
    end
    if (acls == CLS_INF || bcls == CLS_INF) begin
      r.cls = CLS_INF; r.flags[F_INF] = 1; return r;
    end
    p = 128'(ac) * 128'(bc);
    while (p >= 128'(TEN16)) begin p = p / 128'd10; k++; end
    r.rounded = k > 0;
    r.exp = ae + be + k - BIAS;
    if (r.exp < 0) begin
      r.exp = 0; r.cls = CLS_FIN; r.coeff = 0; r.flags[F_UF] = 1; r.flags[F_ZERO] = 1; return r;
    end
    if (r.exp > EMAX) begin
      r.exp = 0; r.cls = CLS_INF; r.flags[F_INF] = 1; r.flags[F_OF] = 1; return r;
    end
    r.cls = CLS_FIN; r.coeff = 64'(p); r.flags[F_ZERO] = (p == 0);
    return r;
  endfunction

endpackage
