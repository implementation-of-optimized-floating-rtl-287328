// fpas_comparator: exponent comparator of the adder/subtractor.
//
// Compares two 3-digit BCD biased exponents. swap is 1 when ae < be (B has
// the larger exponent) and 0 otherwise, including when they are equal. The
// right shift amount is the larger minus the smaller exponent, formed by a
// 3-digit BCD subtractor and given both in BCD (rsa_bcd) and as a 5-bit
// binary digit count (rsa) for the barrel shifter; rsa saturates at 31,
// which already shifts every digit out. Packed BCD compares like an
// unsigned binary number, so the magnitude test is a plain comparison.
// Combinational.
// swap and RSA follow the design; the saturated binary shift count is this
// design's choice.
module fpas_comparator (
  input  logic [11:0] ae,
  input  logic [11:0] be,
  output logic        swap,
  output logic [11:0] rsa_bcd,
  output logic [4:0]  rsa
);
  logic [11:0] e_big, e_small;
  logic        no_borrow_unused;

  assign swap  = ae < be;
  assign e_big   = swap ? be : ae;
  assign e_small = swap ? ae : be;

  bcd_addsub #(.NDIG(3)) u_sub (.a(e_big), .b(e_small), .sub(1'b1), .s(rsa_bcd), .cout(no_borrow_unused));

  always_comb begin
    logic [6:0] tu;
    tu = 7'(rsa_bcd[7:4]) * 7'd10 + 7'(rsa_bcd[3:0]);
    if (rsa_bcd[11:8] != 4'd0 || tu > 7'd31) rsa = 5'd31;
    else                                     rsa = tu[4:0];
  end
endmodule
