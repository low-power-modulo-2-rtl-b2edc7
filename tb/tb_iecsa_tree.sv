// Test of iecsa_tree at the default N = 8 (five operands, three levels) and
// with N = 16, GW = 4 (nine operands). Operands are random, half of them
// sign-extended from a short width so that the data-aware hold happens.
// Expected: sum + carry = (sum of operands) + OPS - 2 (mod 2^N+1), with the
// result exactly 2*L cycles after its operands.
module tb_iecsa_tree;
  import mdm_pkg::*;

  localparam int unsigned OA = 5, OB = 9;
  localparam int unsigned LA = csa_levels(OA), LB = csa_levels(OB);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0]  opsa [OA];
  logic [15:0] opsb [OB];
  logic        va, vb;
  logic [7:0]  sa, ca;
  logic [15:0] sb, cb;
  logic [LA-1:0] ska;
  logic [LB-1:0] skb;
  int unsigned checks = 0, failures = 0;
  int unsigned nska [LA];

  iecsa_tree #(.N(8), .GW(4), .OPS(OA)) ua (
    .clk, .rst_n, .in_valid, .ops(opsa), .out_valid(va), .sum(sa), .carry(ca), .lv_skip(ska)
  );
  iecsa_tree #(.N(16), .GW(4), .OPS(OB)) ub (
    .clk, .rst_n, .in_valid, .ops(opsb), .out_valid(vb), .sum(sb), .carry(cb), .lv_skip(skb)
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] val(input int w);
    logic [15:0] v;
    int keep;
    v = 16'($urandom);
    if ($urandom_range(1)) begin
      keep = $urandom_range(1, 4);
      for (int i = keep; i < 16; i++) v[i] = v[keep-1];
    end
    return v & 16'((1 << w) - 1);
  endfunction

  int unsigned qa[$], qb[$], qa_cyc[$], qb_cyc[$];
  int unsigned cycle = 0, sent = 0;
  logic done = 1'b0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && !done) begin
      logic go;
      go = (sent < 3000) && ($urandom_range(3) != 0);
      in_valid <= go;
      if (go) begin
        longint unsigned ta, tb;
        sent <= sent + 1;
        ta = OA - 2;
        tb = OB - 2;
        for (int k = 0; k < OA; k++) begin
          logic [15:0] v;
          v = val(8);
          opsa[k] <= v[7:0];
          ta += v;
        end
        for (int k = 0; k < OB; k++) begin
          logic [15:0] v;
          v = val(16);
          opsb[k] <= v;
          tb += v;
        end
        qa.push_back(int'(ta % 257));
        qb.push_back(int'(tb % 65537));
        qa_cyc.push_back(cycle + 1 + 2 * LA);
        qb_cyc.push_back(cycle + 1 + 2 * LB);
      end
      if (sent >= 3000) done <= 1'b1;
    end
  end

  always @(posedge clk) begin
    if (rst_n && va) begin
      int unsigned e, ec;
      e = qa.pop_front(); ec = qa_cyc.pop_front();
      checks++;
      if ((int'(sa) + int'(ca)) % 257 != e || cycle != ec) begin
        failures++;
        if (failures < 10) $display("ERROR: N=8 sum+carry=%0d expected %0d (cycle %0d/%0d)", (int'(sa) + int'(ca)) % 257, e, cycle, ec);
      end
      for (int l = 0; l < LA; l++) if (ska[l]) nska[l]++;
    end
    if (rst_n && vb) begin
      int unsigned e, ec;
      e = qb.pop_front(); ec = qb_cyc.pop_front();
      checks++;
      if ((int'(sb) + int'(cb)) % 65537 != e || cycle != ec) begin
        failures++;
        if (failures < 10) $display("ERROR: N=16 sum+carry wrong");
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done);
    repeat (2 * LB + 4) @(posedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin failures++; $display("ERROR: results missing"); end
    for (int l = 0; l < LA; l++) begin
      checks++;
      if (nska[l] == 0) begin failures++; $display("ERROR: level %0d never held", l); end
    end
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
