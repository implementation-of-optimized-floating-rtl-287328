// dpd_to_bcd: densely packed decimal declet (10 bits) to three BCD digits,
// following the IEEE 754-2008 DPD decoding table. Bits v, w, x, s, t of the
// declet tell which digits are large (8 or 9); large digits keep only their
// low bit in the declet. Non-canonical declets decode like their canonical
// counterparts. Combinational.
module dpd_to_bcd (
  input  logic [9:0]  dpd,
  output logic [11:0] bcd   // {d2, d1, d0}
);
  logic p, q, r, s, t, u, v, w, x, y;
  assign {p, q, r, s, t, u, v, w, x, y} = dpd;

  always_comb begin
    if (!v)                 bcd = {1'b0, p, q, r, 1'b0, s, t, u, 1'b0, w, x, y};
    else if ({w, x} == 2'b00) bcd = {1'b0, p, q, r, 1'b0, s, t, u, 3'b100, y};
    else if ({w, x} == 2'b01) bcd = {1'b0, p, q, r, 3'b100, u, 1'b0, s, t, y};
    else if ({w, x} == 2'b10) bcd = {3'b100, r, 1'b0, s, t, u, 1'b0, p, q, y};
    else begin
      unique case ({s, t})
        2'b00:   bcd = {3'b100, r, 3'b100, u, 1'b0, p, q, y};
        2'b01:   bcd = {3'b100, r, 1'b0, p, q, u, 3'b100, y};
        2'b10:   bcd = {1'b0, p, q, r, 3'b100, u, 3'b100, y};
        default: bcd = {3'b100, r, 3'b100, u, 3'b100, y};
      endcase
    end
  end
endmodule
