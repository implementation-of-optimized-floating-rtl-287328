// bcd_rshift: digit-wise right barrel shifter.
//
// Shifts an NDIG-digit BCD vector right by shamt whole digits, filling with
// zero digits; digits shifted out are dropped (truncation). The shifter has
// one stage per bit of shamt: stage k shifts by 2^k digits when bit k is
// set, so the delay grows with log2 of the shift range instead of with the
// shift amount. A shift of NDIG or more gives all zeros. Combinational.
// A barrel shifter is what the design calls for; the log2-stage form and
// the saturating behaviour are this design's choices.
module bcd_rshift #(
  parameter int unsigned NDIG = 16,
  parameter int unsigned SHW  = 5
) (
  input  logic [4*NDIG-1:0] din,
  input  logic [SHW-1:0]    shamt,
  output logic [4*NDIG-1:0] dout
);
  logic [4*NDIG-1:0] stage [SHW+1];

  assign stage[0] = din;
  for (genvar k = 0; k < SHW; k++) begin : g_stage
    localparam int unsigned DIST = 4 * (2 ** k);
    if (DIST >= 4 * NDIG) begin : g_clear
      assign stage[k+1] = shamt[k] ? '0 : stage[k];
    end else begin : g_shift
      assign stage[k+1] = shamt[k] ? {{DIST{1'b0}}, stage[k][4*NDIG-1:DIST]} : stage[k];
    end
  end
  assign dout = stage[SHW];
endmodule
