// tb_op_select: for each of the four operation codes checks the sign given
// to the adder/subtractor and which result (adder, multiplier or zero) is
// passed on, with random results on both inputs.
module tb_op_select;
  import dfp_pkg::*;
  dfp_op_e    op;
  logic       bs, bse;
  dfp_num_t   ar, mr, r;
  dfp_class_e ac, mc, rc;
  dfp_flags_t af, mf, rf;
  int checks = 0, failures = 0;

  op_select dut (.operation(op), .b_sign_in(bs), .b_sign_eff(bse),
                 .fpas_r(ar), .fpas_cls(ac), .fpas_flags(af),
                 .fpm_r(mr), .fpm_cls(mc), .fpm_flags(mf),
                 .r(r), .r_cls(rc), .r_flags(rf));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      op = dfp_op_e'(n % 4);
      bs = 1'($urandom_range(0, 1));
      ar = {$urandom(), $urandom(), 13'($urandom())};
      mr = {$urandom(), $urandom(), 13'($urandom())};
      ac = dfp_class_e'($urandom_range(0, 2)); mc = dfp_class_e'($urandom_range(0, 2));
      af = 5'($urandom()); mf = 5'($urandom());
      #1;
      checks++;
      case (n % 4)
        0: if (bse != bs || r != ar || rc != ac || rf != af) begin failures++; $display("FAIL add"); end
        1: if (bse != !bs || r != ar || rc != ac || rf != af) begin failures++; $display("FAIL sub"); end
        2: if (r != mr || rc != mc || rf != mf) begin failures++; $display("FAIL mul"); end
        default: if (r != '0 || rc != DFP_FINITE || rf != '0) begin failures++; $display("FAIL nop"); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
