// Exhaustive test of ppg at N = 8 (every A and B in 0..256).
//
// Checks, with arithmetic independent of the encoder logic:
//  * for each row i there is a digit D in {-2..2} with
//    pp_i + 1 + z_i*4^i = D*4^i*A (mod 257), z_i = 1 when the row's Booth
//    code is a zero digit (then D must be 0);
//  * the rows and the zero-digit corrections together give
//    sum(pp_i + 1 + z_i*4^i) = A*B (mod 257).
module tb_ppg;
  import mdm_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = N / 2;
  localparam int unsigned M = (1 << N) + 1;

  logic         clk = 1'b0;
  logic [N-1:0] a_dim;
  logic         a_zero;
  logic [N:0]   b;
  logic [N-1:0] pp [K];
  booth_t       code [K];
  int unsigned  checks = 0, failures = 0;

  ppg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int unsigned A = 0; A < M; A++) begin
      for (int unsigned B = 0; B < M; B++) begin
        int unsigned total;
        a_zero = (A == 0);
        a_dim  = (A == 0) ? N'($urandom) : N'(A - 1);
        b      = (N+1)'(B);
        #1;
        total = 0;
        for (int i = 0; i < K; i++) begin
          int unsigned w, v;
          logic        zero, ok;
          w    = (1 << (2 * i)) % M;
          zero = !code[i].x1 && !code[i].x2;
          v    = (int'(pp[i]) + 1 + (zero ? w : 0)) % M;
          ok   = 1'b0;
          for (int d = -2; d <= 2; d++) begin
            int unsigned t;
            t = ((d + 5 * M) * w % M) * A % M;
            if (t == v && (!zero || d == 0)) ok = 1'b1;
          end
          checks++;
          if (!ok) begin
            failures++;
            if (failures < 10) $display("ERROR: A=%0d B=%0d row %0d = %0d is no Booth multiple", A, B, i, pp[i]);
          end
          total = (total + v) % M;
        end
        checks++;
        if (total != (A * B) % M) begin
          failures++;
          if (failures < 10) $display("ERROR: A=%0d B=%0d rows give %0d expected %0d", A, B, total, (A * B) % M);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
