// psm_tb_pkg: testbench helpers for the PSM FIR filter.
//
// encode() turns a sign-magnitude coefficient (16 magnitude bits, bit 15 =
// 2^0 down to bit 0 = 2^-15) into the coded LUT word the PEs use. It scans
// the magnitude from the 2^0 end; at each set bit it takes that bit and the
// next two as one 3-bit operand placed at the set bit's position, then
// continues after the group. A coefficient that needs more than five
// operands cannot be coded and encode() returns 0. Mux6 and Mux8 are set
// from the operand count. coef_value() gives the signed coefficient in units
// of 2^-15, independent of the coding, for reference models.
package psm_tb_pkg;
  import psm_fir_pkg::*;

  function automatic bit encode(input bit sign, input logic [15:0] mag,
                                output coef_code_t c, output int nops);
    int p;
    c    = '0;
    nops = 0;
    p    = 0;
    while (p < 16) begin
      if (mag[15-p]) begin
        logic [2:0] grp;
        grp[2] = 1'b1;
        grp[1] = (p + 1 < 16) ? mag[15-p-1] : 1'b0;
        grp[0] = (p + 2 < 16) ? mag[15-p-2] : 1'b0;
        if (nops >= NUM_OPS) return 1'b0;
        c.op[nops].bcs   = grp;
        c.op[nops].shift = SHIFT_W'(p);
        nops++;
        p += 3;
      end else begin
        p++;
      end
    end
    c.sign = sign;
    case (nops)
      0, 1:    c.mux6_sel = SEL_SHR1;
      2:       c.mux6_sel = SEL_A1;
      3:       c.mux6_sel = SEL_A3;
      default: c.mux6_sel = SEL_A4;
    endcase
    c.mux8_sel = (nops == 5);
    return 1'b1;
  endfunction

  function automatic longint coef_value(input bit sign, input logic [15:0] mag);
    return sign ? -longint'(mag) : longint'(mag);
  endfunction

  // Random codable coefficient; the density of set bits varies so that
  // every operand count from 0 to 5 occurs.
  function automatic void rand_coef(output bit sign, output logic [15:0] mag,
                                    output coef_code_t c, output int nops);
    logic [15:0] m;
    do begin
      case ($urandom_range(0, 3))
        0: m = 16'($urandom) & 16'($urandom) & 16'($urandom);
        1: m = 16'($urandom) & 16'($urandom);
        2: m = 16'($urandom);
        default: m = 16'($urandom) | 16'($urandom);
      endcase
    end while (!encode(1'b0, m, c, nops));
    sign = 1'($urandom);
    mag  = m;
    void'(encode(sign, mag, c, nops));
  endfunction

endpackage
