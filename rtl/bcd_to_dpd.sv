// bcd_to_dpd: three BCD digits to a canonical densely packed decimal
// declet, following the IEEE 754-2008 DPD encoding table. The most
// significant bits (a, e, i) of the three digits select one of eight
// layouts; small digits keep three bits, large ones (8, 9) only their low
// bit. Combinational.
module bcd_to_dpd (
  input  logic [11:0] bcd,  // {d2, d1, d0}
  output logic [9:0]  dpd
);
  logic a, b, c, d, e, f, g, h, i, j, k, m;
  assign {a, b, c, d, e, f, g, h, i, j, k, m} = bcd;

  always_comb begin
    unique case ({a, e, i})
      3'b000:  dpd = {b, c, d, f, g, h, 1'b0, j, k, m};
      3'b001:  dpd = {b, c, d, f, g, h, 3'b100, m};
      3'b010:  dpd = {b, c, d, j, k, h, 3'b101, m};
      3'b011:  dpd = {b, c, d, 2'b10, h, 3'b111, m};
      3'b100:  dpd = {j, k, d, f, g, h, 3'b110, m};
      3'b101:  dpd = {f, g, d, 2'b01, h, 3'b111, m};
      3'b110:  dpd = {j, k, d, 2'b00, h, 3'b111, m};
      default: dpd = {2'b00, d, 2'b11, h, 3'b111, m};
    endcase
  end
endmodule
