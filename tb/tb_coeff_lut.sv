// tb_coeff_lut: writes random coded rows into the coefficient LUT and checks
// every row after every cycle against a model array; also checks the reset
// contents, that we = 0 writes nothing and that out-of-range addresses are
// ignored.
module tb_coeff_lut;
  import psm_fir_pkg::*;

  localparam int unsigned NUM_ROWS = 6;   // not a power of two: AW = 3
  localparam int unsigned AW = $clog2(NUM_ROWS);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          we;
  logic [AW-1:0] waddr;
  coef_code_t    wdata;
  coef_code_t    codes [NUM_ROWS];
  coef_code_t    model [NUM_ROWS];
  int checks = 0, failures = 0;
  int writes = 0, ignored = 0;

  coeff_lut #(.NUM_ROWS(NUM_ROWS)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .codes(codes));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coef_code_t rand_code();
    logic [63:0] v;
    v = {$urandom, $urandom};
    return coef_code_t'(v[$bits(coef_code_t)-1:0]);
  endfunction

  task automatic compare();
    for (int i = 0; i < NUM_ROWS; i++) begin
      checks++;
      if (codes[i] != model[i]) begin
        failures++;
        $display("FAIL row %0d got %h exp %h", i, codes[i], model[i]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    we    = 1'b0;
    waddr = '0;
    wdata = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    compare();
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      we    = ($urandom_range(0, 3) != 0);
      waddr = AW'($urandom);
      wdata = rand_code();
      @(posedge clk);
      if (we && waddr < NUM_ROWS) begin model[waddr] = wdata; writes++; end
      else ignored++;
      @(negedge clk);
      compare();
    end
    // reset clears every row
    rst_n = 1'b0;
    #1;
    foreach (model[i]) model[i] = '0;
    compare();
    $display("writes %0d, ignored %0d", writes, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
