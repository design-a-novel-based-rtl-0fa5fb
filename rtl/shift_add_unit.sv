// shift_add_unit: binary-common-subexpression (BCS) generator shared by all
// processing elements of the filter.
//
// For an input sample x it forms every 3-bit BCS of x, the patterns [000] to
// [111] with bit weights (2^0, 2^-1, 2^-2). To keep full precision the outputs
// are scaled by four, so output k equals k * x:
//   bcs[0] = 0          bcs[4] = 4x
//   bcs[1] = x          bcs[5] = 4x + x
//   bcs[2] = 2x         bcs[6] = 4x + 2x
//   bcs[3] = 2x + x     bcs[7] = 4x + 2x + x
// Only the four patterns with more than one set bit ([011], [101], [110],
// [111]) need an adder; the rest are wiring. The shared-precomputer idea and
// the 3-bit patterns follow the filter's description; the scaling by four is
// this design's choice (a right shift of x would drop bits).
//
// Interface: x is XW-bit two's complement, each bcs[k] is XW+3-bit two's
// complement. Purely combinational, no latency. bcs[0] is the constant zero
// and the low bits of the even patterns are zero by construction; the PE
// multiplexers select them like any other pattern.
module shift_add_unit
  import psm_fir_pkg::*;
#(
  parameter int unsigned XW = 16
) (
  input  logic signed [XW-1:0]   x,
  output logic signed [XW+2:0]   bcs [NUM_BCS]
);

  logic signed [XW+2:0] x1, x2, x4;

  always_comb begin
    x1 = {{3{x[XW-1]}}, x};
    x2 = x1 <<< 1;
    x4 = x1 <<< 2;
    bcs[0] = '0;
    bcs[1] = x1;
    bcs[2] = x2;
    bcs[3] = x2 + x1;
    bcs[4] = x4;
    bcs[5] = x4 + x1;
    bcs[6] = x4 + x2;
    bcs[7] = bcs[6] + x1;
  end

endmodule
