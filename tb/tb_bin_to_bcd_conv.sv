// tb_bin_to_bcd_conv: exhaustive check of the binary-to-BCD converter over
// the range of digit products, 0..81.
module tb_bin_to_bcd_conv;
  logic [6:0] p;
  logic [3:0] hi, lo;
  int checks = 0, failures = 0;

  bin_to_bcd_conv dut (.p(p), .hi(hi), .lo(lo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 81; v++) begin
      p = 7'(v);
      #1;
      checks++;
      if (hi != 4'(v / 10) || lo != 4'(v % 10)) begin
        failures++;
        $display("FAIL %0d -> %0d %0d", v, hi, lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
