// structural_adders: transposed direct-form delay line of the FIR filter.
//
// Takes one product per tap, p[k] = h_k * x(n), and forms
//   y(n) = sum_k h_k * x(n-k)
// with a chain of registers (D) and adders: the product of the last tap goes
// into the first register, each later register holds its tap's product plus
// the register before it, and y is tap 0's product plus the last register:
//   z[NUM_TAPS-1] <= p[NUM_TAPS-1]
//   z[k]          <= p[k] + z[k+1]         (1 <= k < NUM_TAPS-1)
//   y              = p[0] + z[1]
// The chain follows the transposed-form structure of the filter's
// description; the full-precision accumulator width (PW plus enough bits for
// NUM_TAPS terms, so it cannot overflow) and the asynchronous active-low
// reset that clears the delay line are this design's choices.
//
// Timing: y is combinational from p[0] and the registers, so y in a cycle
// includes p[0] of that cycle and p[k] of k cycles before.
module structural_adders #(
  parameter int unsigned PW       = 37,
  parameter int unsigned NUM_TAPS = 16,
  localparam int unsigned YW = PW + $clog2(NUM_TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [PW-1:0] p [NUM_TAPS],
  output logic signed [YW-1:0] y
);

  logic signed [YW-1:0] z [1:NUM_TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < NUM_TAPS; k++) z[k] <= '0;
    end else begin
      z[NUM_TAPS-1] <= YW'(p[NUM_TAPS-1]);
      for (int k = 1; k < NUM_TAPS - 1; k++) z[k] <= YW'(p[k]) + z[k+1];
    end
  end

  assign y = YW'(p[0]) + z[1];

endmodule
