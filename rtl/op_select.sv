// op_select: operation selection of the arithmetic unit.
//
// operation 00 selects addition and 01 subtraction; both take the result of
// the adder/subtractor. For subtraction the sign of B is inverted on its way
// into the adder/subtractor, so that A - B is computed as A + (-B).
// 10 selects the multiplier result (B keeps its sign). 11 selects nothing:
// the result is a finite +0 with biased exponent 0 and no flags, which
// encodes to an all-zero packet. Combinational.
// The operation codes follow the design; inverting B's sign here for
// subtraction is this design's reading of the block diagram.
module op_select
  import dfp_pkg::*;
(
  input  dfp_op_e    operation,
  input  logic       b_sign_in,
  output logic       b_sign_eff,   // sign of B as seen by the adder/subtractor
  input  dfp_num_t   fpas_r,
  input  dfp_class_e fpas_cls,
  input  dfp_flags_t fpas_flags,
  input  dfp_num_t   fpm_r,
  input  dfp_class_e fpm_cls,
  input  dfp_flags_t fpm_flags,
  output dfp_num_t   r,
  output dfp_class_e r_cls,
  output dfp_flags_t r_flags
);
  assign b_sign_eff = b_sign_in ^ (operation == OP_SUB);

  always_comb begin
    unique case (operation)
      OP_ADD, OP_SUB: begin r = fpas_r; r_cls = fpas_cls; r_flags = fpas_flags; end
      OP_MUL:         begin r = fpm_r;  r_cls = fpm_cls;  r_flags = fpm_flags;  end
      default:        begin r = '0;     r_cls = DFP_FINITE; r_flags = '0;      end
    endcase
  end
endmodule
