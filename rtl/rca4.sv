// rca4: 4-bit ripple-carry binary adder made of four equal-bypass full
// adders. s = a + b + cin, cout is the carry out of bit 3. Combinational.
// Ripple-carry connection as in the BCD adder it serves; using the
// equal-bypass cell in place of a conventional full adder follows the
// design.
module rca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [4:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_fa
    eb_full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .sum(s[i]), .cout(c[i+1]));
  end
  assign cout = c[4];
endmodule
