// dfp_decoder: unpacks one IEEE 754-2008 decimal64 number in DPD encoding.
//
// Bit 63 is the sign, bits 62:50 the 13-bit combination field G and bits
// 49:0 five DPD declets holding the 15 trailing significand digits.
// G[12:8] (the top five bits) give the most significant digit and the two
// leading exponent bits: if they start with 11 the digit is 8 or 9 (100e)
// and the exponent bits are G[10:9]; otherwise the digit is 0cde and the
// exponent bits are G[12:11]. 11110 marks infinity and 11111 NaN. The 10-bit
// binary biased exponent is converted to three BCD digits with a shift-and-
// add-3 converter, and each declet to three BCD digits, so the outputs are
// a sign, a 3-digit BCD biased exponent and a 16-digit BCD significand. For
// infinity and NaN the exponent and significand outputs are zero (payloads
// are not kept). Combinational.
// The field layout is the decimal64 standard; converting the exponent to
// BCD follows the design, the shift-and-add-3 converter is this design's
// choice.
module dfp_decoder
  import dfp_pkg::*;
(
  input  logic [63:0] pkt,
  output dfp_num_t    num,
  output dfp_class_e  cls
);
  logic [12:0] g;
  logic [9:0]  exp_bin;
  logic [3:0]  msd;
  logic [11:0] exp_bcd;
  logic [59:0] trail_bcd;

  assign g = pkt[62:50];

  always_comb begin
    if (g[12:11] == 2'b11) begin
      exp_bin = {g[10:9], g[7:0]};
      msd     = {3'b100, g[8]};
    end else begin
      exp_bin = {g[12:11], g[7:0]};
      msd     = {1'b0, g[10:8]};
    end
  end

  // binary to BCD, shift-and-add-3 over the ten exponent bits
  always_comb begin
    logic [21:0] sh;
    sh = {12'd0, exp_bin};
    for (int n = 0; n < 10; n++) begin
      if (sh[13:10] >= 4'd5) sh[13:10] = sh[13:10] + 4'd3;
      if (sh[17:14] >= 4'd5) sh[17:14] = sh[17:14] + 4'd3;
      if (sh[21:18] >= 4'd5) sh[21:18] = sh[21:18] + 4'd3;
      sh = sh << 1;
    end
    exp_bcd = sh[21:10];
  end

  for (genvar k = 0; k < 5; k++) begin : g_declet
    dpd_to_bcd u_dec (.dpd(pkt[10*k +: 10]), .bcd(trail_bcd[12*k +: 12]));
  end

  always_comb begin
    num.sign = pkt[63];
    if (g[12:9] == 4'b1111) begin
      cls      = g[8] ? DFP_NAN : DFP_INF;
      num.exp  = '0;
      num.mant = '0;
    end else begin
      cls      = DFP_FINITE;
      num.exp  = exp_bcd;
      num.mant = {msd, trail_bcd};
    end
  end
endmodule
