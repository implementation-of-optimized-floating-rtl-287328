// tb_eb_full_adder: exhaustive check of the equal-bypass full adder against
// a + b + c for all eight input combinations.
module tb_eb_full_adder;
  logic a, b, c, sum, cout;
  int checks = 0, failures = 0;

  eb_full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(a) + 2'(b) + 2'(c)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> cout=%0b sum=%0b", a, b, c, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
