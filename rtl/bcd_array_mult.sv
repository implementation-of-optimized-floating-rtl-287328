// bcd_array_mult: N x N digit parallel (fully combinational) BCD multiplier.
//
// Every digit pair x[j] * y[i] is multiplied by a single-digit BCD
// multiplier, giving a high nibble H(i,j) of weight 10^(i+j+1) and a low
// nibble L(i,j) of weight 10^(i+j). Product column k therefore collects the
// L nibbles with i + j = k and the H nibbles with i + j = k - 1.
//
// Each column is summed by a chain of single-digit BCD adders (a, b, carry
// in -> sum, carry out). The first adder takes two terms; each later adder
// adds the running sum digit, the next term (or 0 when the terms are used
// up) and one carry from column k-1. Every adder's carry out goes
// diagonally to one adder of column k+1, so a column has as many adders as
// it needs to take all its terms and all carries arriving from the right:
// n(k) = max(terms(k) - 1, n(k-1)). The last adder's sum is product digit
// k; column 0 has a single term and no adder. There is no clock: the
// product settles through the longest chain of digit adders.
//
// p = x * y, 2N BCD digits, digit 0 in bits [3:0].
// The digit multipliers, the H/L nibble weights and the column-wise array
// of single-digit BCD adders with carries into the next column follow the
// design's array multiplier; how many adders a column gets and which carry
// enters which adder is this design's own generalisation of the 4 x 4
// example to N digits.
module bcd_array_mult #(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] x,
  input  logic [4*N-1:0] y,
  output logic [8*N-1:0] p
);
  localparam int unsigned NCOL = 2 * N;
  localparam int unsigned MAXA = 2 * N;   // bound on adders per column

  // number of L nibbles in column k (digit pairs with i + j = k)
  function automatic int unsigned n_low(int k);
    if (k < 0 || k > 2 * int'(N) - 2) return 0;
    return (k < int'(N)) ? unsigned'(k + 1) : unsigned'(2 * int'(N) - 1 - k);
  endfunction

  function automatic int unsigned n_terms(int k);
    return n_low(k) + n_low(k - 1);
  endfunction

  // adders in column k
  function automatic int unsigned n_add(int k);
    int unsigned n = 0;
    for (int c = 0; c <= k; c++) begin
      if (n_terms(c) - 1 > n) n = n_terms(c) - 1;
    end
    return n;
  endfunction

  // lowest multiplier digit index i of the pairs in column k
  function automatic int unsigned i_first(int k);
    return (k > int'(N) - 1) ? unsigned'(k - int'(N) + 1) : 0;
  endfunction

  logic [4*N-1:0] hi_d [N];   // [i], digit j at [4*j +: 4]
  logic [4*N-1:0] lo_d [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      bcd_digit_mult u_dm (.x(x[4*j +: 4]), .y(y[4*i +: 4]),
                           .hi(hi_d[i][4*j +: 4]), .lo(lo_d[i][4*j +: 4]));
    end
  end

  for (genvar k = 0; k < NCOL; k++) begin : g_column
    localparam int unsigned NL = n_low(k);
    localparam int unsigned NT = n_terms(k);
    localparam int unsigned NA = n_add(k);
    localparam int unsigned NA_PREV = (k == 0) ? 0 : n_add(k - 1);

    // the terms of this column, L nibbles first, then H nibbles, then zeros
    logic [4*(MAXA+1)-1:0] terms;
    always_comb begin
      terms = '0;
      for (int t = 0; t < int'(NL); t++)
        terms[4*t +: 4] = lo_d[int'(i_first(k)) + t][4*(k - int'(i_first(k)) - t) +: 4];
      for (int t = 0; t < int'(NT - NL); t++)
        terms[4*(int'(NL) + t) +: 4] = hi_d[int'(i_first(k - 1)) + t][4*(k - 1 - int'(i_first(k - 1)) - t) +: 4];
    end

    // carries out of this column's adders, one per adder
    logic [MAXA-1:0] cout;
    // running sum after each adder
    logic [4*MAXA-1:0] run;

    for (genvar t = 0; t < MAXA; t++) begin : g_add
      if (t < NA) begin : g_da
        logic [3:0] a_in;
        logic       c_in;
        if (t == 0) begin : g_first
          assign a_in = terms[3:0];
        end else begin : g_next
          assign a_in = run[4*(t-1) +: 4];
        end
        if (t < NA_PREV) begin : g_cin
          assign c_in = g_column[k-1].cout[t];
        end else begin : g_nocin
          assign c_in = 1'b0;
        end
        bcd_digit_adder u_da (.a(a_in), .b(terms[4*(t+1) +: 4]), .cin(c_in),
                              .s(run[4*t +: 4]), .cout(cout[t]));
      end else begin : g_none
        assign run[4*t +: 4] = 4'd0;
        assign cout[t]       = 1'b0;
      end
    end

    if (NA == 0) begin : g_pass
      assign p[4*k +: 4] = terms[3:0];
    end else begin : g_out
      assign p[4*k +: 4] = run[4*(NA-1) +: 4];
    end
  end
endmodule
