// dfp_pkg: types and constants shared by the decimal64 arithmetic unit.
//
// A decoded operand is carried as a 77-bit record: one sign bit, a 3-digit
// BCD biased exponent (12 bits) and a 16-digit BCD significand (64 bits).
// Alongside it travels a class tag (finite, infinity, NaN) and, for results,
// five status flags. The decimal64 constants (16 digits, bias 398, largest
// biased exponent 767) are those of the IEEE 754-2008 decimal64 format.
package dfp_pkg;

  localparam int unsigned P_DIGITS = 16;          // significand digits of decimal64
  localparam logic [11:0] BIAS_BCD = 12'h398;     // exponent bias, BCD
  localparam logic [11:0] EMAX_BCD = 12'h767;     // largest biased exponent, BCD

  // Decoded number: {sign, exponent, mantissa} = 1 + 12 + 64 = 77 bits.
  typedef struct packed {
    logic        sign;
    logic [11:0] exp;   // 3 BCD digits, biased
    logic [63:0] mant;  // 16 BCD digits, integer significand
  } dfp_num_t;

  typedef enum logic [1:0] {
    DFP_FINITE = 2'b00,
    DFP_INF    = 2'b01,
    DFP_NAN    = 2'b10
  } dfp_class_e;

  typedef struct packed {
    logic inf;
    logic nan;
    logic zero;
    logic of;   // exponent overflow
    logic uf;   // exponent underflow
  } dfp_flags_t;

  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_MUL = 2'b10,
    OP_NOP = 2'b11
  } dfp_op_e;

endpackage
