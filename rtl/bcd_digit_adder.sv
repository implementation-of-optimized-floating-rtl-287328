// bcd_digit_adder: one-digit BCD adder.
//
// A first 4-bit binary adder forms the binary sum z = a + b + cin (0..19).
// The decimal carry is raised when that adder carries out or when the 4-bit
// sum exceeds 9, detected as z3&z2 | z3&z1. A second 4-bit adder then adds
// 0110 (six) to the binary sum when the decimal carry is set, and its own
// carry out is ignored. Both binary adders are ripple-carry adders of
// equal-bypass full adders. Inputs must be valid BCD digits (0..9).
// Purely combinational.
// The two-adder structure and the +6 correction follow the design; the
// exact gate form of the carry detect is the standard one.
module bcd_digit_adder (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] z;
  logic       c1;
  logic       c2_unused;

  rca4 u_bin (.a(a), .b(b), .cin(cin), .s(z), .cout(c1));

  assign cout = c1 | (z[3] & z[2]) | (z[3] & z[1]);

  rca4 u_fix (.a(z), .b({1'b0, cout, cout, 1'b0}), .cin(1'b0), .s(s), .cout(c2_unused));
endmodule
