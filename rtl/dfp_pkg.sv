// dfp_pkg: types and constants shared by the Decimal64 adder/subtractor.
// A Decimal64 operand is unpacked into an unpacked_t: sign, 10-bit biased
// exponent (0..767, bias 398) and a 16-digit BCD significand, plus its class
// (finite, infinity, quiet NaN, signalling NaN). Rounding-mode codes are the
// 3-bit codes of the design's mode input (five IEEE 754-2008 modes plus the
// half-up and half-down test modes).
package dfp_pkg;

  localparam int unsigned DIGITS      = 16;           // precision p of Decimal64
  localparam int unsigned SIG_W       = 4 * DIGITS;   // BCD significand width
  localparam int unsigned EXP_W       = 10;           // biased exponent width
  localparam int unsigned EMAX_BIASED = 767;          // largest biased exponent (emax + bias - (p-1))

  typedef enum logic [2:0] {
    RM_NEAREST_EVEN = 3'b000,
    RM_AWAY_ZERO    = 3'b001,
    RM_POS_INF      = 3'b010,
    RM_NEG_INF      = 3'b011,
    RM_ZERO         = 3'b100,
    RM_HALF_UP      = 3'b101,
    RM_HALF_DOWN    = 3'b110
  } round_mode_e;

  typedef enum logic [1:0] {
    CLS_FINITE = 2'd0,
    CLS_INF    = 2'd1,
    CLS_QNAN   = 2'd2,
    CLS_SNAN   = 2'd3
  } dfp_class_e;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;   // biased exponent
    logic [SIG_W-1:0] sig;   // 16 BCD digits, most significant digit in bits 63:60
    dfp_class_e       cls;
  } unpacked_t;

  // Canonical encodings of the special results.
  localparam logic [63:0] QNAN_RESULT = {1'b0, 5'b11111, 58'd0};
  localparam logic [62:0] INF_BODY    = {5'b11110, 58'd0};
  localparam logic [62:0] MAX_BODY    = {5'b11101, 8'hFF, {5{10'b0011111111}}};

endpackage
