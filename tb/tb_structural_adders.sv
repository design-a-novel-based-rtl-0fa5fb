// tb_structural_adders: drives random products into the transposed delay
// line and checks y(n) = sum_k p_k(n-k) against a history of the inputs.
// Uses 7 taps and extreme values to check that the accumulator cannot
// overflow.
module tb_structural_adders;
  localparam int unsigned PW = 37, NUM_TAPS = 7;
  localparam int unsigned YW = PW + $clog2(NUM_TAPS);

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic signed [PW-1:0] p [NUM_TAPS];
  logic signed [YW-1:0] y;
  longint hist [NUM_TAPS][$];   // hist[k][j]: p_k of j cycles ago
  int checks = 0, failures = 0;

  structural_adders #(.PW(PW), .NUM_TAPS(NUM_TAPS)) dut (.clk(clk), .rst_n(rst_n), .p(p), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    foreach (p[k]) p[k] = '0;
    for (int k = 0; k < NUM_TAPS; k++) repeat (NUM_TAPS) hist[k].push_front(0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      longint e;
      logic [63:0] v;
      for (int k = 0; k < NUM_TAPS; k++) begin
        v = {$urandom, $urandom};
        p[k] = PW'(v);
        if (n >= 1000 && n < 1100) p[k] = {1'b1, {(PW-1){1'b0}}};   // most negative
        if (n >= 1100 && n < 1200) p[k] = {1'b0, {(PW-1){1'b1}}};   // most positive
        hist[k].push_front(longint'(p[k]));
        void'(hist[k].pop_back());
      end
      #1;
      e = 0;
      for (int k = 0; k < NUM_TAPS; k++) e += hist[k][k];
      checks++;
      if (longint'(y) != e) begin
        failures++;
        $display("FAIL n=%0d got %0d exp %0d", n, y, e);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
