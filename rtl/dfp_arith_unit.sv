// dfp_arith_unit: decimal64 floating point arithmetic unit (top level).
//
// Two IEEE 754-2008 decimal64 operands in DPD encoding, apkt and bpkt, are
// decoded into sign, 3-digit BCD exponent and 16-digit BCD significand. The
// 2-bit operation selects addition (00), subtraction (01), multiplication
// (10) or nothing (11, result packet all zeros). The adder/subtractor and the
// multiplier both work on every pair of operands; the operation selection
// picks one result, which is encoded back to decimal64 and registered.
//
// Interface: in_valid qualifies apkt, bpkt and operation. Timing: the whole
// datapath up to the encoder is combinational, so out_valid, opkt and flags
// appear one clock cycle after the operands are presented, and a new
// operation can be issued every cycle. flags = {inf, nan, zero, of, uf}.
// Active-low asynchronous reset.
// The block structure and operation codes follow the design; the single
// output register, the valid handshake and the flags port are this design's
// choices.
module dfp_arith_unit
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [1:0]  operation,
  input  logic [63:0] apkt,
  input  logic [63:0] bpkt,
  output logic        out_valid,
  output logic [63:0] opkt,
  output logic [4:0]  flags
);
  dfp_num_t   a_num, b_num, b_eff;
  dfp_class_e a_cls, b_cls;
  dfp_num_t   as_r, m_r, sel_r;
  dfp_class_e as_cls, m_cls, sel_cls;
  dfp_flags_t as_flags, m_flags, sel_flags, flags_q;
  logic       b_sign_eff;

  dfp_decoder u_dec_a (.pkt(apkt), .num(a_num), .cls(a_cls));
  dfp_decoder u_dec_b (.pkt(bpkt), .num(b_num), .cls(b_cls));

  op_select u_opsel (
    .operation (dfp_op_e'(operation)),
    .b_sign_in (b_num.sign),
    .b_sign_eff(b_sign_eff),
    .fpas_r    (as_r),  .fpas_cls(as_cls), .fpas_flags(as_flags),
    .fpm_r     (m_r),   .fpm_cls (m_cls),  .fpm_flags (m_flags),
    .r         (sel_r), .r_cls   (sel_cls), .r_flags  (sel_flags)
  );

  always_comb begin
    b_eff      = b_num;
    b_eff.sign = b_sign_eff;
  end

  fpas u_fpas (.a(a_num), .a_cls(a_cls), .b(b_eff), .b_cls(b_cls),
               .r(as_r), .r_cls(as_cls), .flags(as_flags));

  fpm u_fpm (.a(a_num), .a_cls(a_cls), .b(b_num), .b_cls(b_cls),
             .r(m_r), .r_cls(m_cls), .flags(m_flags));

  dfp_encoder u_enc (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                     .num(sel_r), .cls(sel_cls), .flags_in(sel_flags),
                     .out_valid(out_valid), .opkt(opkt), .flags(flags_q));

  assign flags = flags_q;
endmodule
