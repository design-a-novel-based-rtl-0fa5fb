// tb_psm_fir_top: end-to-end test of the PSM FIR filter at its default size
// (16 taps, 16-bit samples, 8 processing elements).
//
// The coded coefficients are written through the LUT port, random samples
// are streamed one per clock, and every output is compared with a direct
// convolution y(n) = 2^17 * sum_k h_k x(n-k) computed with multiplications.
// The model records which coefficient set each sample met when it entered,
// so it also covers a reconfiguration while samples are flowing. The test
// runs: an impulse response, random streaming, a reload of all rows between
// streams, a reload of rows while streaming, and full-scale samples. It
// checks the two-cycle latency through out_valid and counts how often each
// mechanism was used: each operand count 1..5 (Mux6 paths and both Mux8
// settings), negative coefficients (complementer), LUT reconfiguration with
// the filter idle and with it running, and valid gaps. A mechanism never
// used counts as a failure.
module tb_psm_fir_top;
  import psm_fir_pkg::*;
  import psm_tb_pkg::*;

  localparam int unsigned XW       = 16;
  localparam int unsigned NUM_TAPS = 16;
  localparam int unsigned NUM_PE   = (NUM_TAPS + 1) / 2;
  localparam int unsigned AW       = $clog2(NUM_PE);
  localparam int unsigned YW       = prod_width(XW) + $clog2(NUM_TAPS);
  localparam int unsigned LAT      = 2;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic signed [XW-1:0] x_in;
  logic                 in_valid;
  logic                 lut_we;
  logic [AW-1:0]        lut_addr;
  coef_code_t           lut_wdata;
  logic signed [YW-1:0] y;
  logic                 out_valid;

  psm_fir_top dut (
    .clk, .rst_n, .x_in, .in_valid, .lut_we, .lut_addr, .lut_wdata, .y, .out_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ops_used [6];
  int neg_used = 0, reload_idle = 0, reload_running = 0, valid_gaps = 0;

  // model: current coefficient of each PE (units of 2^-15)
  longint h_now [NUM_PE];
  // history, newest first: sample value, coefficient set it met, its valid
  longint xs [$];
  longint hs [$][NUM_PE];
  bit     vs [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: drive inputs at the falling edge, model the rising edge,
  // then check the outputs at the next falling edge.
  task automatic step(input logic signed [XW-1:0] x, input bit v,
                      input bit we, input int addr, input coef_code_t wd, input longint hval);
    longint e;
    longint snap [NUM_PE];
    x_in = x; in_valid = v; lut_we = we; lut_addr = AW'(addr); lut_wdata = wd;
    @(posedge clk);
    snap = h_now;                      // PEs read the LUT as it was before this edge
    xs.push_front(longint'(x)); hs.push_front(snap); vs.push_front(v);
    if (xs.size() > NUM_TAPS + LAT) begin
      void'(xs.pop_back()); void'(hs.pop_back()); void'(vs.pop_back());
    end
    if (we) h_now[addr] = hval;
    @(negedge clk);
    // y belongs to the sample captured LAT edges ago, counting this one:
    // index LAT-1 in the history
    e = 0;
    for (int k = 0; k < NUM_TAPS; k++) begin
      int j = LAT - 1 + k;
      int pe = (k < NUM_PE) ? k : NUM_TAPS - 1 - k;
      if (j < xs.size()) e += hs[j][pe] * xs[j] * 4;
    end
    checks++;
    if (longint'(y) != e) begin
      failures++;
      $display("FAIL t=%0t y=%0d exp %0d", $time, y, e);
    end
    checks++;
    if (out_valid != ((vs.size() >= LAT) ? vs[LAT-1] : 1'b0)) begin
      failures++;
      $display("FAIL t=%0t out_valid=%0b", $time, out_valid);
    end
  endtask

  // Random codable coefficient for one row, with usage counting.
  task automatic new_coef(output coef_code_t c, output longint hval);
    bit sign; logic [15:0] mag; int nops;
    rand_coef(sign, mag, c, nops);
    hval = coef_value(sign, mag);
    ops_used[nops]++;
    if (sign && mag != 0) neg_used++;
  endtask

  task automatic load_all_idle();
    coef_code_t c; longint hv;
    for (int a = 0; a < NUM_PE; a++) begin
      new_coef(c, hv);
      step('0, 1'b0, 1'b1, a, c, hv);
    end
    reload_idle++;
  endtask

  task automatic stream(input int n, input bit full_scale);
    for (int i = 0; i < n; i++) begin
      logic signed [XW-1:0] x;
      bit v;
      x = XW'($urandom);
      v = ($urandom_range(0, 7) != 0);
      if (full_scale) x = $urandom_range(0, 1) ? 16'sh8000 : 16'sh7fff;
      if (!v) valid_gaps++;
      step(v ? x : '0, v, 1'b0, 0, '0, 0);
    end
  endtask

  initial begin
    coef_code_t c; longint hv;
    bit s; logic [15:0] m; int no;
    rst_n = 1'b0;
    x_in = '0; in_valid = 1'b0; lut_we = 1'b0; lut_addr = '0; lut_wdata = '0;
    foreach (h_now[i]) h_now[i] = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (y != 0 || out_valid) begin failures++; $display("FAIL reset outputs"); end
    rst_n = 1'b1;

    // 1. fixed set covering every operand count, then its impulse response
    for (int a = 0; a < NUM_PE; a++) begin
      case (a)
        0: m = 16'h8000;  // 1.0: one operand
        1: m = 16'h4200;  // two operands
        2: m = 16'h2491;  // three
        3: m = 16'h9249;  // 1001 0010 0100 1001: six single bits -> re-coded below
        4: m = 16'h9248;  // five operands
        5: m = 16'hfffe;  // five operands, largest magnitude they reach
        6: m = 16'h1234;  // four
        default: m = 16'h0001;  // 2^-15
      endcase
      s = (a % 3 == 1);
      if (!encode(s, m, c, no)) begin
        m = 16'h9240;     // not codable in five operands: use a codable one
        void'(encode(s, m, c, no));
      end
      ops_used[no]++;
      if (s) neg_used++;
      step('0, 1'b0, 1'b1, a, c, coef_value(s, m));
    end
    reload_idle++;
    step(16'sd1000, 1'b1, 1'b0, 0, '0, 0);
    stream(0, 0);
    for (int i = 0; i < NUM_TAPS + 4; i++) step('0, 1'b1, 1'b0, 0, '0, 0);

    // 2. random coefficients, random samples
    for (int r = 0; r < 6; r++) begin
      load_all_idle();
      stream(150, 0);
    end

    // 3. reload while the filter keeps running
    for (int r = 0; r < 6; r++) begin
      for (int a = 0; a < NUM_PE; a++) begin
        new_coef(c, hv);
        step(XW'($urandom), 1'b1, 1'b1, a, c, hv);
      end
      reload_running++;
      stream(60, 0);
    end

    // 4. full-scale samples
    stream(200, 1);

    for (int i = 1; i <= 5; i++) begin
      checks++;
      if (ops_used[i] == 0) begin failures++; $display("FAIL operand count %0d never used", i); end
    end
    checks++; if (neg_used == 0)       begin failures++; $display("FAIL complementer never used"); end
    checks++; if (reload_idle == 0)    begin failures++; $display("FAIL no idle reload"); end
    checks++; if (reload_running == 0) begin failures++; $display("FAIL no running reload"); end
    checks++; if (valid_gaps == 0)     begin failures++; $display("FAIL no valid gap"); end
    $display("operand counts 1..5: %0d %0d %0d %0d %0d; negative %0d; reloads idle %0d running %0d; valid gaps %0d",
             ops_used[1], ops_used[2], ops_used[3], ops_used[4], ops_used[5], neg_used,
             reload_idle, reload_running, valid_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
