// tb_bcd_digit_mult_bin: exhaustive check of the BCD digit multiplier's
// binary product for all 100 digit pairs.
module tb_bcd_digit_mult_bin;
  logic [3:0] x, y;
  logic [6:0] p;
  int checks = 0, failures = 0;

  bcd_digit_mult_bin dut (.x(x), .y(y), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++) begin
        x = 4'(i); y = 4'(j);
        #1;
        checks++;
        if (p != 7'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
