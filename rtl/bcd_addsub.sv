// bcd_addsub: NDIG-digit BCD adder/subtractor.
//
// Addition (sub = 0): s = a + b, ripple of NDIG BCD digit adders, cout is
// the decimal carry out of the top digit.
// Subtraction (sub = 1): every digit of b is replaced by its nines'
// complement (9 - d) and the carry in is 1, so s = a - b modulo 10^NDIG;
// cout = 1 means a >= b (no borrow). Callers that need a magnitude order
// the operands so that a >= b. Purely combinational; digits are packed with
// digit 0 in bits [3:0].
// The 17-digit width follows the design; ripple connection and nines'
// complement subtraction are this design's choices.
module bcd_addsub #(
  parameter int unsigned NDIG = 17
) (
  input  logic [4*NDIG-1:0] a,
  input  logic [4*NDIG-1:0] b,
  input  logic              sub,
  output logic [4*NDIG-1:0] s,
  output logic              cout
);
  logic [NDIG:0] c;
  assign c[0] = sub;

  for (genvar i = 0; i < NDIG; i++) begin : g_dig
    logic [3:0] bd;
    // nines' complement of a BCD digit: 9 - d
    assign bd = sub ? (4'd9 - b[4*i +: 4]) : b[4*i +: 4];
    bcd_digit_adder u_da (.a(a[4*i +: 4]), .b(bd), .cin(c[i]), .s(s[4*i +: 4]), .cout(c[i+1]));
  end

  assign cout = c[NDIG];
endmodule
