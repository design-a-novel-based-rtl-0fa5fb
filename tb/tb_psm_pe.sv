// tb_psm_pe: streams random samples and random coded coefficients (a new
// pair every cycle) through one PSM processing element and checks that,
// two cycles later, prod equals h * x * 2^17 computed by multiplication.
// Counts how often each operand count (and so each Mux6/Mux8 path) and a
// negative coefficient (complementer path) occurred.
module tb_psm_pe;
  import psm_fir_pkg::*;
  import psm_tb_pkg::*;

  localparam int unsigned XW = 16;
  localparam int unsigned BW = XW + BCS_W;
  localparam int unsigned PW = prod_width(XW);
  localparam int unsigned LAT = 2;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic signed [BW-1:0] bcs [NUM_BCS];
  coef_code_t           code;
  logic signed [PW-1:0] prod;
  int checks = 0, failures = 0;
  int ops_seen [6];
  int neg_seen = 0;

  psm_pe #(.XW(XW)) dut (.clk(clk), .rst_n(rst_n), .bcs(bcs), .code(code), .prod(prod));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint expq [$];

  initial begin
    bit sign;
    logic [15:0] mag;
    int nops;
    logic signed [XW-1:0] x;
    rst_n = 1'b0;
    code  = '0;
    for (int k = 0; k < NUM_BCS; k++) bcs[k] = '0;
    repeat (2) @(negedge clk);
    // after reset the product is zero
    checks++;
    if (prod != 0) begin failures++; $display("FAIL reset prod=%0d", prod); end
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (expq.size() == LAT) begin
        longint e;
        e = expq.pop_front();
        checks++;
        if (longint'(prod) != e) begin
          failures++;
          $display("FAIL n=%0d got %0d exp %0d", n, prod, e);
        end
      end
      rand_coef(sign, mag, code, nops);
      x = XW'($urandom);
      if (n % 97 == 0) x = 16'sh8000;
      if (n % 89 == 0) begin mag = 16'hfffe; if (!encode(sign, mag, code, nops)) failures++; end
      for (int k = 0; k < NUM_BCS; k++) bcs[k] = BW'(longint'(k) * longint'(x));
      ops_seen[nops]++;
      if (sign && mag != 0) neg_seen++;
      // h in units of 2^-15, product in units of 2^-17: factor 4
      expq.push_back(coef_value(sign, mag) * longint'(x) * 4);
    end
    for (int i = 1; i <= 5; i++) begin
      checks++;
      if (ops_seen[i] == 0) begin failures++; $display("FAIL operand count %0d never used", i); end
    end
    checks++;
    if (neg_seen == 0) begin failures++; $display("FAIL no negative coefficient"); end
    $display("operand counts 0..5: %0d %0d %0d %0d %0d %0d, negative: %0d",
             ops_seen[0], ops_seen[1], ops_seen[2], ops_seen[3], ops_seen[4], ops_seen[5], neg_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
