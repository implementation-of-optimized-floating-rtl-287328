// tb_dfp_arith_unit: end-to-end test of the decimal64 arithmetic unit at
// its default size. Random decimal64 packets (built by the reference
// packer) are issued with a random operation, mostly back to back and
// sometimes with idle cycles. Each result packet and its flags are compared
// with the reference add/subtract/multiply one clock cycle after issue,
// which also checks the latency. The test counts how often each mechanism
// occurred (the four operation codes, operand swap, truncating alignment,
// the adder's carry into the 17th digit, negative differences, the
// multiplier's rounding shift, overflow, underflow, infinity, NaN) and
// counts a failure for any that never did.
module tb_dfp_arith_unit;
  import tb_dfp_ref_pkg::*;
  localparam int NOPS = 4000;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0]  operation = '0;
  logic [63:0] apkt = '0, bpkt = '0;
  logic        out_valid;
  logic [63:0] opkt;
  logic [4:0]  flags;
  int checks = 0, failures = 0;

  localparam int M_ADD = 0, M_SUB = 1, M_MUL = 2, M_NOP = 3, M_SWAP = 4, M_ALIGN = 5,
                 M_ACARRY = 6, M_NEG = 7, M_MSHIFT = 8, M_OF = 9, M_UF = 10, M_INF = 11,
                 M_NAN = 12, M_IDLE = 13, M_N = 14;
  int cnt [M_N];
  string names [M_N] = '{"add", "sub", "mul", "nop", "swap", "truncating-align", "adder-carry-round",
                         "negative-diff", "mul-round-shift", "overflow", "underflow", "inf", "nan", "idle-cycle"};

  always #5 clk = ~clk;

  dfp_arith_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .operation(operation),
                      .apkt(apkt), .bpkt(bpkt), .out_valid(out_valid), .opkt(opkt), .flags(flags));

  initial begin
    repeat (NOPS * 3 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_cls();
    int t = $urandom_range(0, 59);
    return (t == 0) ? CLS_NAN : (t < 3) ? CLS_INF : CLS_FIN;
  endfunction

  initial begin
    logic        exp_valid;
    logic [63:0] exp_pkt;
    logic [4:0]  exp_flags;
    foreach (cnt[i]) cnt[i] = 0;
    exp_valid = 0; exp_pkt = '0; exp_flags = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NOPS; n++) begin
      bit sa, sb;
      int ea, eb, ka, kb, op;
      longint unsigned ma, mb;
      ref_res_t e;
      @(negedge clk);
      // result of the previous cycle's issue
      checks++;
      if (out_valid != exp_valid || (exp_valid && (opkt != exp_pkt || flags != exp_flags))) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: v=%0b %h fl=%b (want v=%0b %h fl=%b)", n, out_valid, opkt, flags,
                   exp_valid, exp_pkt, exp_flags);
      end
      if (n > 0 && $urandom_range(0, 9) == 0) begin
        in_valid = 0; exp_valid = 0; cnt[M_IDLE]++;
        continue;
      end
      op = $urandom_range(0, 3);
      if (op == 3 && $urandom_range(0, 3) != 0) op = $urandom_range(0, 2);
      sa = 1'($urandom_range(0, 1)); sb = 1'($urandom_range(0, 1));
      ea = $urandom_range(0, EMAX);
      case ($urandom_range(0, 3))
        0: eb = ea;
        1: eb = $urandom_range(0, EMAX);
        default: eb = ea + $urandom_range(0, 20) - 10;
      endcase
      if (op == 2 && $urandom_range(0, 1) == 1) begin
        ea = 398 + $urandom_range(0, 40) - 20; eb = 398 + $urandom_range(0, 40) - 20;
      end
      if (eb < 0) eb = 0;
      if (eb > EMAX) eb = EMAX;
      ma = rand_coeff(); mb = rand_coeff();
      ka = rnd_cls(); kb = rnd_cls();
      if (n == 1) begin op = 0; ea = EMAX; eb = EMAX; ma = TEN16 - 1; mb = TEN16 - 1; ka = CLS_FIN; kb = CLS_FIN; end
      if (ka != CLS_FIN) begin ea = 0; ma = 0; end
      if (kb != CLS_FIN) begin eb = 0; mb = 0; end
      apkt = pack(sa, ea, ma, ka);
      bpkt = pack(sb, eb, mb, kb);
      if (ka == CLS_NAN) sa = 0;
      if (kb == CLS_NAN) sb = 0;
      operation = 2'(op);
      in_valid  = 1;
      case (op)
        0: e = add(sa, ea, ma, ka, sb, eb, mb, kb);
        1: e = add(sa, ea, ma, ka, !sb, eb, mb, kb);
        2: e = mul(sa, ea, ma, ka, sb, eb, mb, kb);
        default: e = '{default: 0};
      endcase
      exp_valid = 1;
      exp_pkt   = pack(e.sign, e.exp, e.coeff, e.cls);
      exp_flags = e.flags;
      cnt[op]++;
      if (op < 2 && e.cls == CLS_FIN) begin
        cnt[M_SWAP]   += int'(e.swapped);
        cnt[M_ALIGN]  += int'(e.truncated_align);
        cnt[M_ACARRY] += int'(e.rounded);
        cnt[M_NEG]    += int'(e.mag_swapped);
      end
      if (op == 2 && e.cls == CLS_FIN && !e.flags[F_UF]) cnt[M_MSHIFT] += int'(e.rounded);
      if (op != 3) begin
        cnt[M_OF]  += int'(e.flags[F_OF]);
        cnt[M_UF]  += int'(e.flags[F_UF]);
        cnt[M_INF] += int'(e.flags[F_INF]);
        cnt[M_NAN] += int'(e.flags[F_NAN]);
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid != exp_valid || (exp_valid && (opkt != exp_pkt || flags != exp_flags))) begin
      failures++;
      $display("FAIL last result");
    end
    foreach (cnt[i]) begin
      $display("  %-20s %0d", names[i], cnt[i]);
      checks++;
      if (cnt[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", names[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
