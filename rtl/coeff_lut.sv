// coeff_lut: coefficient look-up table of the PSM FIR filter.
//
// One row per processing element holds that PE's coded coefficient
// (psm_fir_pkg::coef_code_t). Because the filter's coefficients are
// symmetric, only the first half (rows 0 .. NUM_ROWS-1 for coefficients
// h_0 .. h_{NUM_ROWS-1}) is stored. All rows are read at once, since every
// PE of the full-parallel filter needs its coefficient in every cycle.
// Reconfiguring the filter for a new standard means writing a new set of
// rows through the write port.
//
// That the LUT holds one coded row per coefficient, only half the set, and
// is reloaded to reconfigure follows the filter's description. The write
// port (one row per cycle), the register-array storage and the reset to all
// zero (every coefficient zero, i.e. y = 0) are this design's choices.
//
// Timing: a row written with we = 1 on a rising edge appears on codes[] after
// that edge. Writes to an address >= NUM_ROWS are ignored. rst_n is
// asynchronous, active low.
module coeff_lut
  import psm_fir_pkg::*;
#(
  parameter int unsigned NUM_ROWS = 8,
  localparam int unsigned AW = (NUM_ROWS > 1) ? $clog2(NUM_ROWS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  coef_code_t      wdata,
  output coef_code_t      codes [NUM_ROWS]
);

  coef_code_t rows [NUM_ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_ROWS; i++) rows[i] <= '0;
    end else if (we && (32'(waddr) < NUM_ROWS)) begin
      rows[waddr] <= wdata;
    end
  end

  assign codes = rows;

endmodule
