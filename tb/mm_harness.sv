// Self-checking driver for one mod_mult_da instance of a given size, used by
// tb_mod_mult_da_sizes. Sends NOPS operations (with EXH set, every pair A, B
// first; otherwise corner operands first: A or B equal to 0, 1 and 2^N, then
// random values, some of them small so the
// data-aware hold happens) with random idle cycles, and checks every product
// against A*B mod 2^N+1 computed by shift-and-add, and its latency 2*L+1.
// Reports its counts when `done` rises.
module mm_harness
  import mdm_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned GW   = 4,
  parameter int unsigned NOPS = 2000,
  parameter bit          EXH  = 1'b0      // walk every pair A, B first
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned skips
);

  localparam int unsigned   L   = csa_levels(N / 2 + 1);
  localparam int unsigned   LAT = 2 * L + 1;
  localparam longint unsigned M = (64'd1 << N) + 1;

  logic         in_valid = 1'b0;
  logic [N-1:0] a_dim = '0;
  logic         a_zero = 1'b0;
  logic [N:0]   b = '0;
  logic         out_valid;
  logic [N:0]   p;
  logic [L-1:0] lv_skip;

  mod_mult_da #(.N(N), .GW(GW)) dut (.*);

  function automatic longint unsigned mulmod(input longint unsigned x, input longint unsigned y);
    longint unsigned r;
    r = 0;
    for (int i = N; i >= 0; i--) begin
      r = (2 * r) % M;
      if (y[i]) r = (r + x) % M;
    end
    return r;
  endfunction

  function automatic longint unsigned pick(input int unsigned k);
    longint unsigned v;
    case (k % 8)
      0: v = 0;
      1: v = 1;
      2: v = M - 1;                 // 2^N
      3: v = M - 2;
      4: v = {$urandom} % 16;       // small
      default: v = ({$urandom, $urandom}) % M;
    endcase
    return v;
  endfunction

  longint unsigned qexp[$];
  int unsigned     qcyc[$];
  int unsigned     cycle = 0, sent = 0;

  initial begin
    checks = 0;
    failures = 0;
    skips = 0;
    done = 1'b0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && sent < NOPS) begin
      logic go;
      go = ($urandom_range(3) != 0);
      in_valid <= go;
      if (go) begin
        longint unsigned A, B;
        if (EXH && sent < M * M) begin
          A = sent / M;
          B = sent % M;
        end else begin
          A = (sent < 64) ? pick(sent) : pick($urandom);
          B = (sent < 64) ? pick(sent / 8) : pick($urandom);
        end
        sent   <= sent + 1;
        a_zero <= (A == 0);
        a_dim  <= (A == 0) ? '0 : N'(A - 1);
        b      <= (N+1)'(B);
        qexp.push_back(mulmod(A, B));
        qcyc.push_back(cycle + 1);
      end
    end else begin
      in_valid <= 1'b0;
    end
    if (rst_n && out_valid) begin
      longint unsigned e;
      int unsigned c;
      e = qexp.pop_front();
      c = qcyc.pop_front();
      checks <= checks + 2;
      if (longint'(p) != e || cycle - c != LAT) begin
        failures <= failures + 1;
        $display("ERROR: N=%0d product %0d expected %0d, latency %0d", N, p, e, cycle - c);
      end
      if (|lv_skip) skips <= skips + 1;
    end
    if (sent == NOPS && qexp.size() == 0) done <= 1'b1;
  end

endmodule
