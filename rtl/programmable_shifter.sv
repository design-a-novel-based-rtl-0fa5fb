// programmable_shifter: the PS block of a processing element.
//
// Shifts a multiplexer output r_i right by the amount held in the coefficient
// LUT, placing a BCS operand at its bit position within the coefficient
// (shift s gives weight 2^-s). The output keeps every bit: the input is first
// widened by FRAC fractional bits, so "r >> s" is exact for s <= FRAC and the
// result is in units of 2^-FRAC of the input's unit. A shift above FRAC (not
// reachable with the default SW = 4, FRAC = 15) would drop low bits.
//
// Interface: r is IW-bit two's complement, shift is SW bits, shr is
// IW+FRAC-bit two's complement. Combinational. That the shifters take their
// amount from the LUT follows the filter's description; the exact widening is
// this design's choice.
module programmable_shifter #(
  parameter int unsigned IW   = 19,
  parameter int unsigned SW   = 4,
  parameter int unsigned FRAC = 15
) (
  input  logic signed [IW-1:0]      r,
  input  logic        [SW-1:0]      shift,
  output logic signed [IW+FRAC-1:0] shr
);

  logic signed [IW+FRAC-1:0] widened;

  always_comb begin
    widened = {r, {FRAC{1'b0}}};
    shr     = widened >>> shift;
  end

endmodule
