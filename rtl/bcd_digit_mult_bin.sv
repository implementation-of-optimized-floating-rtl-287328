// bcd_digit_mult_bin: area-reduced multiplier of two BCD digits.
//
// Produces the 7-bit binary product p = x * y (0..81) of two BCD digits.
// The AND partial products are grouped by weight as in a 4x4 array
// multiplier, but because a BCD digit with bit 3 set has bits 2 and 1 clear,
// several partial products of the same weight can never be 1 together. Those
// are merged with OR gates instead of adders: {x2y1, x0y3}, {x1y2, x3y0} at
// weight 8, {x3y1, x2y2, x1y3} at weight 16 and {x3y2, x2y3} at weight 32.
// This leaves at most three terms per column. A first row of adders (HA,
// FA, FA, HA, HA for weights 2..32) reduces them, a second row of four half
// adders adds the first row's carries, and p6 is the OR of x3y3 and the two
// carries into weight 64.
// Inputs above 9 give a wrong product. Combinational.
// The grouping of partial products follows the published area-optimised
// digit multiplier and its adder count; the order in which carries enter
// each adder is this design's reading of the figure.
module bcd_digit_mult_bin (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [6:0] p
);
  logic w1a, w1b;
  logic w2a, w2b, w2c;
  logic w3a, w3b;
  logic w4, w5, w6;

  assign w1a = x[0] & y[1];
  assign w1b = x[1] & y[0];
  assign w2a = x[0] & y[2];
  assign w2b = x[2] & y[0];
  assign w2c = x[1] & y[1];
  assign w3a = (x[2] & y[1]) | (x[0] & y[3]);
  assign w3b = (x[1] & y[2]) | (x[3] & y[0]);
  assign w4  = (x[3] & y[1]) | (x[2] & y[2]) | (x[1] & y[3]);
  assign w5  = (x[3] & y[2]) | (x[2] & y[3]);
  assign w6  = x[3] & y[3];

  // column reduction: a row of half/full adders on the grouped terms, then
  // a row of half adders that adds the carries of the first row
  logic c1, c2a, s2a, c2b, c3a, s3a, c3b, c4a, s4a, c4b, c5a, s5a, c5b;

  assign p[0] = x[0] & y[0];
  assign {c1, p[1]}  = 2'(w1a) + 2'(w1b);                // HA
  assign {c2a, s2a}  = 2'(w2a) + 2'(w2b) + 2'(c1);       // FA
  assign {c2b, p[2]} = 2'(s2a) + 2'(w2c);                // HA
  assign {c3a, s3a}  = 2'(w3a) + 2'(w3b) + 2'(c2a);      // FA
  assign {c3b, p[3]} = 2'(s3a) + 2'(c2b);                // HA
  assign {c4a, s4a}  = 2'(w4) + 2'(c3a);                 // HA
  assign {c4b, p[4]} = 2'(s4a) + 2'(c3b);                // HA
  assign {c5a, s5a}  = 2'(w5) + 2'(c4a);                 // HA
  assign {c5b, p[5]} = 2'(s5a) + 2'(c4b);                // HA
  // the product is below 128, so at most one of these three is set
  assign p[6] = w6 | c5a | c5b;
endmodule
