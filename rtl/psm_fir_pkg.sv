// psm_fir_pkg: types and constants shared by the programmable-shift-method
// (PSM) FIR filter.
//
// A coefficient h is represented in sign-magnitude form with one integer bit
// (weight 2^0) and fifteen fractional bits (2^-1 .. 2^-15). Before it is loaded
// into the coefficient LUT it is split into at most NUM_OPS non-zero operands.
// Each operand is a 3-bit binary common subexpression (BCS) pattern b with the
// bit weights (2^0, 2^-1, 2^-2), placed at a right shift s:
//
//     |h| = sum_i  (b_i / 4) * 2^-s_i ,   h = sign ? -|h| : |h|
//
// The fields of the coded LUT word (coef_code_t) drive the PE directly:
//   op[i].bcs   select of Mux(i+1), which picks BCS pattern b_i of x
//   op[i].shift amount of programmable shifter PS(i+1)
//   mux8_sel    0: shr4 goes on to adder A4, 1: A2 = shr4 + shr5 does
//   mux6_sel    which partial sum is the product (shr1, A1, A3 or A4)
//   sign        Mux7 takes the complementer output when set
// The split into three-bit groups, the five operands and the select signals
// follow the filter's description; the bit layout of the coded word and the
// 4-bit shift field (shifts 0..15, one per coefficient bit position) are this
// design's own choice.
package psm_fir_pkg;

  // Bits per binary common subexpression.
  localparam int unsigned BCS_W = 3;
  // Number of BCS patterns produced by the shift-and-add unit.
  localparam int unsigned NUM_BCS = 1 << BCS_W;
  // Non-zero operands per coefficient (Mux1..Mux5, PS1..PS5).
  localparam int unsigned NUM_OPS = 5;
  // Coefficient magnitude bits: 2^0 down to 2^-15.
  localparam int unsigned COEF_MAG_W = 16;
  // Fractional coefficient bits.
  localparam int unsigned COEF_FRAC = COEF_MAG_W - 1;
  // Width of a programmable-shifter amount (0 .. COEF_FRAC).
  localparam int unsigned SHIFT_W = 4;
  // Mux6: how many partial sums make up the product.
  typedef enum logic [1:0] {
    SEL_SHR1 = 2'd0,  // one operand
    SEL_A1   = 2'd1,  // two operands
    SEL_A3   = 2'd2,  // three operands
    SEL_A4   = 2'd3   // four or five operands (Mux8 decides)
  } mux6_sel_e;

  typedef struct packed {
    logic [BCS_W-1:0]   bcs;
    logic [SHIFT_W-1:0] shift;
  } operand_t;

  typedef struct packed {
    logic                     sign;
    mux6_sel_e                mux6_sel;
    logic                     mux8_sel;
    operand_t [NUM_OPS-1:0]   op;
  } coef_code_t;


  // Width of a PE product for an XW-bit input. Products carry 17 fractional
  // bits: 15 from the coefficient and 2 from the BCS weights 2^-1 and 2^-2.: a BCS output needs XW+3 bits,
  // a shifter adds COEF_FRAC bits and the sum of five operands three more.
  function automatic int unsigned prod_width(int unsigned xw);
    return xw + BCS_W + COEF_FRAC + 3;
  endfunction

endpackage
