// fp_pkg: shared types and constants of the single-precision adder.
// An IEEE 754 single is {sign, 8-bit exponent, 23-bit fraction}. Inside the
// adder, an operand is "prepared" as a 33-bit word {sign, exponent, 24-bit
// significand}, where the significand carries the implicit bit in front.
// The operand-type and input-case encodings below are this design's own
// choice; the paper names the signals (sel, outa, outb) but gives no codes.
package fp_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned SIG_W  = 24;   // significand with implicit bit
  localparam int unsigned PREP_W = 33;   // {sign, exponent, significand}

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // Type of one operand (Enabler outputs outa / outb).
  typedef enum logic [1:0] {
    T_ZERO    = 2'b00,
    T_DENORM  = 2'b01,
    T_NORMAL  = 2'b10,
    T_SPECIAL = 2'b11   // infinity or NaN
  } op_type_e;

  // Input case (Enabler output sel).
  typedef enum logic [1:0] {
    C_NORMAL = 2'b00,   // both normal
    C_DENORM = 2'b01,   // both denormal
    C_MIXED  = 2'b10,   // one normal, one denormal
    C_EXCEPT = 2'b11    // a zero, infinity or NaN is involved
  } in_case_e;

  typedef struct packed {
    logic                    sign;
    logic [EXP_W-1:0]        exp;
    logic [FRAC_W-1:0]       frac;
  } fp32_t;

  typedef struct packed {
    logic                    sign;
    logic [EXP_W-1:0]        exp;
    logic [SIG_W-1:0]        sig;
  } prep_t;

endpackage
