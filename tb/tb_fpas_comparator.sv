// tb_fpas_comparator: random and equal BCD exponent pairs; checks swap,
// the BCD difference and the saturated binary shift amount.
module tb_fpas_comparator;
  import tb_dfp_ref_pkg::*;
  logic [11:0] ae, be, rsa_bcd;
  logic swap;
  logic [4:0] rsa;
  int checks = 0, failures = 0;

  fpas_comparator dut (.ae(ae), .be(be), .swap(swap), .rsa_bcd(rsa_bcd), .rsa(rsa));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int x, y, d;
      x = $urandom_range(0, EMAX);
      y = (n % 3 == 0) ? x : (n % 3 == 1) ? $urandom_range(0, EMAX)
                                         : (x + $urandom_range(0, 40)) % (EMAX + 1);
      ae = exp_to_bcd(x); be = exp_to_bcd(y);
      #1;
      d = (x > y) ? x - y : y - x;
      checks++;
      if (swap != (x < y) || rsa_bcd != exp_to_bcd(d) || rsa != 5'((d > 31) ? 31 : d)) begin
        failures++;
        $display("FAIL %0d vs %0d: swap=%0b rsa_bcd=%h rsa=%0d", x, y, swap, rsa_bcd, rsa);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
