// tb_bcd_rshift: random 16-digit values shifted by every amount 0..31,
// checked against integer division by 10^shift.
module tb_bcd_rshift;
  import tb_dfp_ref_pkg::*;
  logic [63:0] din, dout;
  logic [4:0] shamt;
  int checks = 0, failures = 0;

  bcd_rshift #(.NDIG(16), .SHW(5)) dut (.din(din), .shamt(shamt), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      longint unsigned v;
      v = rand_coeff();
      for (int sh = 0; sh < 32; sh++) begin
        longint unsigned e;
        din = to_bcd(v); shamt = 5'(sh);
        #1;
        e = (sh >= 17) ? 0 : v / pow10(sh);
        checks++;
        if (dout != to_bcd(e)) begin
          failures++;
          $display("FAIL %0d >> %0d digits: %h", v, sh, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
