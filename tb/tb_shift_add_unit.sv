// tb_shift_add_unit: checks that output k of the shift-and-add unit equals
// k times the input for random and corner-case samples.
module tb_shift_add_unit;
  import psm_fir_pkg::*;

  localparam int unsigned XW = 16;

  logic signed [XW-1:0] x;
  logic signed [XW+2:0] bcs [NUM_BCS];
  int checks = 0, failures = 0;

  shift_add_unit #(.XW(XW)) dut (.x(x), .bcs(bcs));

  task automatic check_x(input logic signed [XW-1:0] v);
    x = v;
    #1;
    for (int k = 0; k < NUM_BCS; k++) begin
      checks++;
      if (longint'(bcs[k]) != longint'(k) * longint'(v)) begin
        failures++;
        $display("FAIL x=%0d k=%0d got %0d", v, k, bcs[k]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_x('0);
    check_x(16'sh7fff);
    check_x(16'sh8000);
    check_x(-16'sd1);
    repeat (2000) check_x(XW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
