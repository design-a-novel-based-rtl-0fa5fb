// psm_fir_top: reconfigurable, full-parallel, symmetric FIR filter built from
// the programmable shift method (PSM) with pipelined processing elements.
//
//   y(n) = sum_{k=0}^{NUM_TAPS-1} h_k * x(n-k),   h_k = h_{NUM_TAPS-1-k}
//
// There are no multipliers. One shared shift-and-add unit forms the eight
// 3-bit binary common subexpressions of the input sample. Each of the
// ceil(NUM_TAPS/2) PEs builds the product with one stored coefficient by
// selecting, shifting and adding up to five of those subexpressions, as its
// coded LUT row says, and negating when the coefficient is negative. Thanks to
// symmetry, PE j drives both tap j and tap NUM_TAPS-1-j of the transposed
// direct-form delay line (structural adders). Loading new rows into the
// coefficient LUT reconfigures the filter without changing the hardware.
//
// The shared unit, the PSM PE with its two pipeline registers, the LUT of half
// the coefficients and the transposed structure follow the filter's
// description. The input width, the number of taps, the LUT write port and
// the valid flag are this design's choices.
//
// Interface:
//   x_in, in_valid    one sample per clock; x_in is XW-bit two's complement
//   lut_we/addr/wdata write coded coefficient row addr (0 .. NUM_PE-1)
//   y, out_valid      y = 2^17 * sum h_k x(n-k), exact, two's complement
// Timing: y in a cycle belongs to the sample that entered two rising edges
// earlier (the two PE pipeline registers); out_valid is in_valid delayed by
// two cycles. A new coefficient row applies to samples entering after the
// write edge; outputs that mix old and new coefficients follow for
// NUM_TAPS-1 samples. rst_n is asynchronous, active low, and clears the LUT
// (all coefficients zero), the pipelines and the delay line.
module psm_fir_top
  import psm_fir_pkg::*;
#(
  parameter int unsigned XW       = 16,
  parameter int unsigned NUM_TAPS = 16,
  localparam int unsigned NUM_PE  = (NUM_TAPS + 1) / 2,
  localparam int unsigned AW      = (NUM_PE > 1) ? $clog2(NUM_PE) : 1,
  localparam int unsigned BW      = XW + BCS_W,
  localparam int unsigned PW      = prod_width(XW),
  localparam int unsigned YW      = PW + $clog2(NUM_TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [XW-1:0] x_in,
  input  logic                 in_valid,
  input  logic                 lut_we,
  input  logic [AW-1:0]        lut_addr,
  input  coef_code_t           lut_wdata,
  output logic signed [YW-1:0] y,
  output logic                 out_valid
);

  // Shared shift-and-add unit (the multiplier block's precomputer).
  logic signed [BW-1:0] bcs [NUM_BCS];

  shift_add_unit #(.XW(XW)) u_sau (
    .x   (x_in),
    .bcs (bcs)
  );

  // Coefficient LUT: one coded row per PE.
  coef_code_t codes [NUM_PE];

  coeff_lut #(.NUM_ROWS(NUM_PE)) u_lut (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (lut_we),
    .waddr (lut_addr),
    .wdata (lut_wdata),
    .codes (codes)
  );

  // Processing elements.
  logic signed [PW-1:0] pe_prod [NUM_PE];

  for (genvar j = 0; j < NUM_PE; j++) begin : g_pe
    psm_pe #(.XW(XW)) u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .bcs   (bcs),
      .code  (codes[j]),
      .prod  (pe_prod[j])
    );
  end

  // Symmetry: tap k uses the PE of coefficient min(k, NUM_TAPS-1-k).
  logic signed [PW-1:0] tap_prod [NUM_TAPS];

  for (genvar k = 0; k < NUM_TAPS; k++) begin : g_tap
    localparam int unsigned J = (k < NUM_PE) ? k : NUM_TAPS - 1 - k;
    assign tap_prod[k] = pe_prod[J];
  end

  structural_adders #(.PW(PW), .NUM_TAPS(NUM_TAPS)) u_sa (
    .clk   (clk),
    .rst_n (rst_n),
    .p     (tap_prod),
    .y     (y)
  );

  // Valid flag follows the two PE pipeline stages.
  logic [1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[0], in_valid};
  end

  assign out_valid = valid_q[1];

endmodule
