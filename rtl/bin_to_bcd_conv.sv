// bin_to_bcd_conv: converts the binary product of two BCD digits (0..81)
// into two BCD digits, hi (tens, the "B" nibble) and lo (units, the "C"
// nibble). The least significant bit is the same in p and lo (lo[0] = p[0],
// since 10 is even). The tens digit is found by comparing p with the
// multiples of ten from 80 down to 10; the units digit is p minus ten times
// that digit. Inputs above 81 are outside the range of a digit product.
// Combinational.
// Its function follows the design; the compare-and-subtract form is this
// design's choice.
module bin_to_bcd_conv (
  input  logic [6:0] p,
  output logic [3:0] hi,
  output logic [3:0] lo
);
  logic [6:0] rem;   // p - 10*hi, at most 9

  always_comb begin
    hi = 4'd0;
    for (int t = 8; t >= 1; t--) begin
      if (hi == 4'd0 && p >= 7'(10 * t)) hi = 4'(t);
    end
    rem = p - 7'(hi) * 7'd10;
    lo  = rem[3:0];
  end
endmodule
