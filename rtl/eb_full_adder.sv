// eb_full_adder: equal-bypass full adder.
//
// The XOR of the two operand bits, p = a ^ b, steers two 2:1 multiplexers.
// When a and b are equal (p = 0) the carry out is a (= b) and the sum is the
// carry in; when they differ (p = 1) the carry out is the carry in and the
// sum is the inverted carry in. The carry therefore passes through a single
// multiplexer. In the original circuit the inverter feeding the sum
// multiplexer is a tri-state inverter enabled by p, so that it is idle when
// a == b; here that branch is an ordinary inverter selected by the
// multiplexer, which gives the same logic function (a two-state netlist has
// no high-impedance value). Purely combinational.
// The cell structure (XOR-steered multiplexers) is the published
// equal-bypass adder; replacing the tri-state inverter by a plain one is
// this design's choice.
module eb_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);
  logic p;
  logic c_n;

  assign p    = a ^ b;
  assign c_n  = ~c;                 // tri-state inverter in the original cell
  assign sum  = p ? c_n : c;
  assign cout = p ? c   : a;
endmodule
