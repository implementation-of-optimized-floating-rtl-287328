// bcd_digit_mult: single-digit BCD multiplier, a binary digit product
// (bcd_digit_mult_bin) followed by the binary-to-BCD converter
// (bin_to_bcd_conv). x * y = 10*hi + lo. Combinational.
module bcd_digit_mult (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [3:0] hi,
  output logic [3:0] lo
);
  logic [6:0] p;
  bcd_digit_mult_bin u_mul (.x(x), .y(y), .p(p));
  bin_to_bcd_conv    u_cvt (.p(p), .hi(hi), .lo(lo));
endmodule
