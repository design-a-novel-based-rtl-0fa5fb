// tb_programmable_shifter: checks shr = r * 2^(FRAC - shift) for every shift
// amount and random signed inputs.
module tb_programmable_shifter;
  localparam int unsigned IW = 19, SW = 4, FRAC = 15;

  logic signed [IW-1:0]      r;
  logic        [SW-1:0]      shift;
  logic signed [IW+FRAC-1:0] shr;
  int checks = 0, failures = 0;

  programmable_shifter #(.IW(IW), .SW(SW), .FRAC(FRAC)) dut (.r(r), .shift(shift), .shr(shr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      r     = IW'($urandom);
      if (n < 16) r = -IW'(7);
      shift = SW'(n % 16);
      #1;
      checks++;
      // exact multiple of 2^(FRAC-shift): compare with a multiplication
      if (longint'(shr) != longint'(r) * (longint'(1) <<< (FRAC - shift))) begin
        failures++;
        $display("FAIL r=%0d shift=%0d got %0d", r, shift, shr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
