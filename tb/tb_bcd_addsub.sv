// tb_bcd_addsub: random additions and subtractions on the 17-digit BCD
// adder/subtractor, checked against binary arithmetic modulo 10^17,
// including subtractions that borrow (a < b).
module tb_bcd_addsub;
  import tb_dfp_ref_pkg::*;
  localparam int NDIG = 17;
  localparam longint unsigned M = 64'd100_000_000_000_000_000;   // 10^17

  logic [4*NDIG-1:0] a, b, s;
  logic sub, cout;
  int checks = 0, failures = 0;

  bcd_addsub #(.NDIG(NDIG)) dut (.a(a), .b(b), .sub(sub), .s(s), .cout(cout));

  function automatic logic [67:0] bcd17(longint unsigned v);
    logic [67:0] r;
    for (int i = 0; i < 17; i++) begin r[4*i +: 4] = 4'(v % 10); v = v / 10; end
    return r;
  endfunction

  function automatic longint unsigned rnd17();
    longint unsigned v = 0;
    int nd = $urandom_range(1, 17);
    for (int i = 0; i < nd; i++) v = v * 10 + longint'($urandom_range(0, 9));
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint unsigned x, y, er;
      bit ec;
      x = rnd17(); y = rnd17();
      if (n == 0) begin x = M - 1; y = 1; end
      if (n == 1) begin x = 5; y = 5; end
      sub = 1'(n % 2);
      a = bcd17(x); b = bcd17(y);
      #1;
      if (!sub) begin er = (x + y) % M; ec = (x + y) >= M; end
      else begin er = (x + M - y) % M; ec = x >= y; end
      checks++;
      if (s != bcd17(er) || cout != ec) begin
        failures++;
        $display("FAIL %0d %s %0d: s=%h cout=%0b expected %0d %0b", x, sub ? "-" : "+", y, s, cout, er, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
