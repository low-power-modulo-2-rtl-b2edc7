// End-to-end test of the modulo 2^N+1 multiplier at its default size (N = 8).
//
// Streams every operand pair A, B in 0..256 through the pipeline, one per
// cycle, then a burst with gaps in in_valid, and compares each product with
// A*B mod 257 computed here with integer arithmetic. It also checks the
// latency (2*L+1 = 7 cycles) and counts how often each mechanism of the design
// was exercised: zero multiplicand (a_zero), B = 2^N (b[N]), zero Booth
// digits (correction term), negative digits, the digit-0/digit-1 wrap fix
// (b[1] = b[N-1] = 1), and a held bit group in each tree level. A mechanism
// that never occurs counts as a failure. A watchdog ends the run.
module tb_mod_mult_da;
  import mdm_pkg::*;

  localparam int unsigned N   = 8;
  localparam int unsigned M   = (1 << N) + 1;
  localparam int unsigned L   = csa_levels(N / 2 + 1);
  localparam int unsigned LAT = 2 * L + 1;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [N-1:0] a_dim = '0;
  logic         a_zero = 1'b0;
  logic [N:0]   b = '0;
  logic         out_valid;
  logic [N:0]   p;
  logic [L-1:0] lv_skip;

  mod_mult_da dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned exp_q[$];
  int unsigned cyc_q[$];
  int unsigned cycle = 0;
  int unsigned n_azero = 0, n_bpow = 0, n_zdig = 0, n_neg = 0, n_wrap = 0;
  int unsigned n_skip [L];

  always @(posedge clk) cycle <= cycle + 1;

  // Output checker: results must come back in order, LAT cycles after issue.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int unsigned e, c;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected output %0d", p);
      end else begin
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        checks++;
        if (p !== (N+1)'(e)) begin
          failures++;
          if (failures < 10) $display("ERROR: product %0d expected %0d", p, e);
        end
        checks++;
        if (cycle - c != LAT) begin
          failures++;
          if (failures < 10) $display("ERROR: latency %0d expected %0d", cycle - c, LAT);
        end
      end
    end
    for (int l = 0; l < L; l++) if (rst_n && lv_skip[l]) n_skip[l]++;
  end

  // Stimulus: phase 0 walks every pair, phase 1 sends random pairs with
  // random idle cycles, phase 2 drains the pipeline.
  int unsigned idx = 0;
  int unsigned rnd = 0;
  logic        done = 1'b0;

  always @(posedge clk) begin
    int unsigned A, B;
    logic go;
    go = 1'b0;
    if (rst_n && !done) begin
      if (idx < M * M) begin
        A  = idx / M;
        B  = idx % M;
        go = 1'b1;
        idx <= idx + 1;
      end else if (rnd < 2000) begin
        rnd <= rnd + 1;
        if ($urandom_range(3) != 0) begin
          A  = $urandom_range(M - 1);
          B  = $urandom_range(M - 1);
          go = 1'b1;
        end
      end else begin
        done <= 1'b1;
      end
    end
    in_valid <= go;
    if (go) begin
      a_zero <= (A == 0);
      a_dim  <= (A == 0) ? '0 : N'(A - 1);
      b      <= (N+1)'(B);
      exp_q.push_back((A * B) % M);
      cyc_q.push_back(cycle + 1);
      if (A == 0) n_azero++;
      if (B == (1 << N)) n_bpow++;
      if (B[1] && B[N-1]) n_wrap++;
    end
  end

  // Count Booth digit kinds from the encoders inside the multiplier.
  always @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < N / 2; i++) begin
        if (!dut.code[i].x1 && !dut.code[i].x2) n_zdig++;
        else if (dut.code[i].sign) n_neg++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    wait (done);
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("ERROR: %0d results missing", exp_q.size());
    end
    checks++; if (n_azero == 0) begin failures++; $display("ERROR: no zero multiplicand"); end
    checks++; if (n_bpow  == 0) begin failures++; $display("ERROR: no B = 2^N"); end
    checks++; if (n_zdig  == 0) begin failures++; $display("ERROR: no zero digit"); end
    checks++; if (n_neg   == 0) begin failures++; $display("ERROR: no negative digit"); end
    checks++; if (n_wrap  == 0) begin failures++; $display("ERROR: no wrap fix"); end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (n_skip[l] == 0) begin failures++; $display("ERROR: level %0d never held a group", l); end
    end
    $display("mechanisms: a_zero=%0d b_pow=%0d zero_digits=%0d neg_digits=%0d wrap=%0d",
             n_azero, n_bpow, n_zdig, n_neg, n_wrap);
    for (int l = 0; l < L; l++) $display("level %0d held a group in %0d results", l, n_skip[l]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
