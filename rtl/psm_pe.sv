// psm_pe: pipelined processing element of the programmable-shift-method (PSM)
// FIR filter. It multiplies the current input sample by one coefficient,
// given as a coded LUT word, using only multiplexers, shifters and adders.
//
// Datapath (one coefficient = up to five BCS operands, see psm_fir_pkg):
//   Mux1..Mux5  pick r_i = bcs[op[i].bcs] from the shared shift-and-add unit
//   pipeline    register r_1..r_5 and the remaining control fields
//   PS1..PS5    shr_i = r_i >> op[i].shift
//   A1 = shr1 + shr2, A2 = shr4 + shr5, A3 = A1 + shr3
//   Mux8        shr4 (mux8_sel = 0) or A2 (mux8_sel = 1)
//   A4 = A3 + Mux8
//   Mux6        shr1, A1, A3 or A4, by the number of operands
//   Complementer two's complement of the Mux6 output
//   pipeline    register the Mux6 output, its complement and the sign
//   Mux7        complement when the coefficient is negative
// The arrangement of multiplexers, shifters, adders and complementer and the
// places of the two pipeline registers follow the pipelined PE of the filter's
// description. The control fields of the coded word travel down the pipeline
// with their data, so a coefficient written to the LUT applies to whole
// samples; that, the reset and the operand order are this design's choices.
//
// Interface: bcs[0..7] come from shift_add_unit (units of x/4); code is the
// coded coefficient; prod = h * x in units of 2^-17, i.e. the exact product
// scaled by 2^17. Timing: prod shows the product for the
// bcs/code values present two rising clock edges earlier (latency 2, one new
// product per cycle). rst_n is asynchronous and active low; it clears both
// pipeline registers.
module psm_pe
  import psm_fir_pkg::*;
#(
  parameter int unsigned XW = 16,
  localparam int unsigned BW = XW + BCS_W,                  // BCS output width
  localparam int unsigned SHW = BW + COEF_FRAC,             // shifter output
  localparam int unsigned PW = prod_width(XW)               // product width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [BW-1:0] bcs [NUM_BCS],
  input  coef_code_t           code,
  output logic signed [PW-1:0] prod
);

  // ---------------- stage 0: multiplexer unit (Mux1..Mux5) ----------------
  logic signed [BW-1:0] r [NUM_OPS];

  always_comb begin
    for (int i = 0; i < NUM_OPS; i++) r[i] = bcs[code.op[i].bcs];
  end

  // ---------------- pipeline process block 1 ------------------------------
  logic signed [BW-1:0]  r_q     [NUM_OPS];
  logic [SHIFT_W-1:0]    shift_q [NUM_OPS];
  logic                  mux8_q;
  mux6_sel_e             mux6_q;
  logic                  sign_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_OPS; i++) begin
        r_q[i]     <= '0;
        shift_q[i] <= '0;
      end
      mux8_q <= 1'b0;
      mux6_q <= SEL_SHR1;
      sign_q <= 1'b0;
    end else begin
      for (int i = 0; i < NUM_OPS; i++) begin
        r_q[i]     <= r[i];
        shift_q[i] <= code.op[i].shift;
      end
      mux8_q <= code.mux8_sel;
      mux6_q <= code.mux6_sel;
      sign_q <= code.sign;
    end
  end

  // ---------------- stage 1: shifters, adders, Mux8, Mux6, complementer ---
  logic signed [SHW-1:0] shr [NUM_OPS];

  for (genvar i = 0; i < NUM_OPS; i++) begin : g_ps
    programmable_shifter #(
      .IW   (BW),
      .SW   (SHIFT_W),
      .FRAC (COEF_FRAC)
    ) u_ps (
      .r     (r_q[i]),
      .shift (shift_q[i]),
      .shr   (shr[i])
    );
  end

  logic signed [PW-1:0] a1, a2, a3, a4, m8, m6, comp;

  always_comb begin
    a1 = PW'(shr[0]) + PW'(shr[1]);
    a2 = PW'(shr[3]) + PW'(shr[4]);
    a3 = a1 + PW'(shr[2]);
    m8 = mux8_q ? a2 : PW'(shr[3]);
    a4 = a3 + m8;
    unique case (mux6_q)
      SEL_SHR1: m6 = PW'(shr[0]);
      SEL_A1:   m6 = a1;
      SEL_A3:   m6 = a3;
      default:  m6 = a4;
    endcase
    comp = -m6;
  end

  // ---------------- pipeline process block 2 ------------------------------
  logic signed [PW-1:0] m6_q, comp_q;
  logic                 sign_q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m6_q    <= '0;
      comp_q  <= '0;
      sign_q2 <= 1'b0;
    end else begin
      m6_q    <= m6;
      comp_q  <= comp;
      sign_q2 <= sign_q;
    end
  end

  // ---------------- Mux7 ---------------------------------------------------
  assign prod = sign_q2 ? comp_q : m6_q;

endmodule
