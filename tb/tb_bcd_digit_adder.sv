// tb_bcd_digit_adder: exhaustive check of the one-digit BCD adder over all
// valid digit pairs and both carry-in values.
module tb_bcd_digit_adder;
  logic [3:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  bcd_digit_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int ci = 0; ci < 2; ci++) begin
          int t;
          a = 4'(x); b = 4'(y); cin = 1'(ci);
          #1;
          t = x + y + ci;
          checks++;
          if (s != 4'(t % 10) || cout != (t >= 10)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> cout=%0b s=%0d", x, y, ci, cout, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
