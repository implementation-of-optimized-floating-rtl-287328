// tb_bcd_array_mult: the 4 x 4 digit array multiplier (the small worked
// example) on random and extreme operands, and the full 16 x 16 digit
// multiplier on random operands, both against 128-bit binary products.
module tb_bcd_array_mult;
  import tb_dfp_ref_pkg::*;
  logic [15:0]  x4, y4;
  logic [31:0]  p4;
  logic [63:0]  x16, y16;
  logic [127:0] p16;
  int checks = 0, failures = 0;

  bcd_array_mult #(.N(4))  dut4  (.x(x4),  .y(y4),  .p(p4));
  bcd_array_mult           dut16 (.x(x16), .y(y16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int i, j;
      logic [63:0] bx, by, bp;
      i = $urandom_range(0, 9999); j = $urandom_range(0, 9999);
      if (n == 0) begin i = 9999; j = 9999; end
      bx = to_bcd(64'(i)); by = to_bcd(64'(j)); bp = to_bcd(64'(i) * 64'(j));
      x4 = bx[15:0]; y4 = by[15:0];
      #1;
      checks++;
      if (p4 != bp[31:0]) begin
        failures++;
        $display("FAIL 4x4 %0d*%0d -> %h", i, j, p4);
      end
    end
    for (int n = 0; n < 300; n++) begin
      longint unsigned u, v;
      u = rand_coeff(); v = rand_coeff();
      if (n == 0) begin u = TEN16 - 1; v = TEN16 - 1; end
      x16 = to_bcd(u); y16 = to_bcd(v);
      #1;
      checks++;
      if (p16 != to_bcd128(128'(u) * 128'(v))) begin
        failures++;
        $display("FAIL 16x16 %0d*%0d -> %h", u, v, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
