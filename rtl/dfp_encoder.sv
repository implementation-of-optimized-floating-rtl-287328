// dfp_encoder: packs a result into IEEE 754-2008 decimal64 (DPD) and
// registers it.
//
// The 3-digit BCD biased exponent is turned into a 10-bit binary exponent
// (100*h + 10*t + u). The most significant significand digit and the two
// leading exponent bits form the first five combination bits: 0cde with
// exponent bits ab gives ab cde, a digit 8 or 9 (100e) gives 11 ab e. The
// remaining eight exponent bits follow, and the 15 trailing digits are
// packed three at a time into canonical DPD declets. Infinity encodes as
// 11110 and NaN as 11111 in the combination field, with all other bits zero
// (the NaN sign is cleared). The exponent must be at most 767.
//
// Timing: the packet and the flags are captured on the rising clock edge
// when in_valid is high; out_valid follows in_valid one cycle later. An
// active-low asynchronous reset clears the outputs.
// The packing is the decimal64 standard; the register, its reset and the
// valid signal are this design's choices.
module dfp_encoder
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  dfp_num_t    num,
  input  dfp_class_e  cls,
  input  dfp_flags_t  flags_in,
  output logic        out_valid,
  output logic [63:0] opkt,
  output dfp_flags_t  flags
);
  logic [9:0]  exp_bin;
  logic [3:0]  msd;
  logic [49:0] trail;
  logic [63:0] pkt;

  assign exp_bin = 10'(num.exp[11:8]) * 10'd100 + 10'(num.exp[7:4]) * 10'd10 + 10'(num.exp[3:0]);
  assign msd     = num.mant[63:60];

  for (genvar k = 0; k < 5; k++) begin : g_declet
    bcd_to_dpd u_enc (.bcd(num.mant[12*k +: 12]), .dpd(trail[10*k +: 10]));
  end

  always_comb begin
    unique case (cls)
      DFP_INF: pkt = {num.sign, 5'b11110, 58'd0};
      DFP_NAN: pkt = {1'b0,     5'b11111, 58'd0};
      default: begin
        if (msd[3]) pkt = {num.sign, 2'b11, exp_bin[9:8], msd[0], exp_bin[7:0], trail};
        else        pkt = {num.sign, exp_bin[9:8], msd[2:0], exp_bin[7:0], trail};
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      opkt      <= '0;
      flags     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        opkt  <= pkt;
        flags <= flags_in;
      end
    end
  end
endmodule
