// Test of da_iecsa at the default W = 8 and at W = 16 (four groups).
//
// Operands are random values sign-extended from a random width, so every
// hold level occurs, streamed with random gaps. Each result is compared bit
// for bit with a plain inverted end-around carry-save adder computed here
// (s = x^y^z, carry = {maj[W-2:0], ~maj[W-1]}), which must also satisfy
// sum + carry = x + y + z + 1 (mod 2^W+1). Results must arrive exactly two
// cycles after their operands. Each hold level must occur at least once.
// The first 8-bit operation is the two-input example 1111_1010 + 1111_0001
// (third input 0), whose sum 0000_1011 and carry 1110_0000 are checked as
// constants.
module tb_da_iecsa;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0]  x8, y8, z8, s8, c8;
  logic [15:0] x16, y16, z16, s16, c16;
  logic v8, v16;
  logic [1:0] h8;
  logic [3:0] h16;
  int unsigned checks = 0, failures = 0;
  int unsigned lvl8 [2];
  int unsigned lvl16 [4];

  da_iecsa #(.W(8), .GW(4)) u8 (
    .clk, .rst_n, .in_valid, .x(x8), .y(y8), .z(z8),
    .out_valid(v8), .sum(s8), .carry(c8), .hold_q(h8)
  );
  da_iecsa #(.W(16), .GW(4)) u16 (
    .clk, .rst_n, .in_valid, .x(x16), .y(y16), .z(z16),
    .out_valid(v16), .sum(s16), .carry(c16), .hold_q(h16)
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] sext(input int keep);
    logic [15:0] v;
    v = 16'($urandom);
    for (int i = keep; i < 16; i++) v[i] = v[keep-1];
    return v;
  endfunction

  // expected results, tagged with the cycle they must appear in
  logic [15:0] q8s[$], q8c[$], q16s[$], q16c[$];
  int unsigned qcyc[$];
  int unsigned cycle = 0;
  logic        done = 1'b0;
  int unsigned sent = 0;
  logic        first = 1'b1;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && !done) begin
      logic go;
      go = (sent < 4000) && ($urandom_range(4) != 0);
      in_valid <= go;
      if (go) begin
        logic [15:0] a, b, c, mj;
        logic [7:0]  m8;
        sent <= sent + 1;
        a = sext($urandom_range(1, 16)); b = sext($urandom_range(1, 16)); c = sext($urandom_range(1, 16));
        x16 <= a; y16 <= b; z16 <= c;
        mj = (a & b) | (a & c) | (b & c);
        q16s.push_back(a ^ b ^ c);
        q16c.push_back({mj[14:0], ~mj[15]});
        a = sext($urandom_range(1, 8)); b = sext($urandom_range(1, 8)); c = sext($urandom_range(1, 8));
        if (sent == 0) begin                        // two-input worked example
          a = 16'h00fa; b = 16'h00f1; c = 16'h0000;
        end
        x8 <= a[7:0]; y8 <= b[7:0]; z8 <= c[7:0];
        m8 = (a[7:0] & b[7:0]) | (a[7:0] & c[7:0]) | (b[7:0] & c[7:0]);
        q8s.push_back({8'h0, a[7:0] ^ b[7:0] ^ c[7:0]});
        q8c.push_back({8'h0, m8[6:0], ~m8[7]});
        qcyc.push_back(cycle + 1 + 2);
      end
      if (sent >= 4000) done <= 1'b1;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (v8 !== v16) begin failures++; $display("ERROR: valid mismatch"); end
      if (v8) begin
        logic [15:0] es8, ec8, es16, ec16;
        int unsigned ecyc;
        es8 = q8s.pop_front(); ec8 = q8c.pop_front();
        es16 = q16s.pop_front(); ec16 = q16c.pop_front();
        ecyc = qcyc.pop_front();
        checks++;
        if (cycle != ecyc) begin failures++; $display("ERROR: latency, cycle %0d expected %0d", cycle, ecyc); end
        checks++;
        if ({s8, c8} !== {es8[7:0], ec8[7:0]}) begin
          failures++;
          if (failures < 10) $display("ERROR: W=8 sum=%h carry=%h expected %h %h hold=%b", s8, c8, es8[7:0], ec8[7:0], h8);
        end
        if (first) begin
          // 1111_1010 + 1111_0001: sum 0000_1011, carry 1110_0000
          checks++;
          if (s8 !== 8'b0000_1011 || c8 !== 8'b1110_0000) begin
            failures++;
            $display("ERROR: worked example gave sum=%b carry=%b", s8, c8);
          end
          first = 1'b0;
        end
        checks++;
        if (((int'(s8) + int'(c8)) % 257) != ((int'(es8) + int'(ec8)) % 257)) failures++;
        checks++;
        if ({s16, c16} !== {es16, ec16}) begin
          failures++;
          if (failures < 10) $display("ERROR: W=16 sum=%h carry=%h expected %h %h hold=%b", s16, c16, es16, ec16, h16);
        end
        for (int g = 1; g < 2; g++) if (h8[g]) lvl8[g]++;
        for (int g = 1; g < 4; g++) if (h16[g]) lvl16[g]++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done);
    repeat (5) @(posedge clk);
    checks++;
    if (qcyc.size() != 0) begin failures++; $display("ERROR: %0d results missing", qcyc.size()); end
    checks++;
    if (lvl8[1] == 0) begin failures++; $display("ERROR: W=8 never held"); end
    for (int g = 1; g < 4; g++) begin
      checks++;
      if (lvl16[g] == 0) begin failures++; $display("ERROR: W=16 group %0d never held", g); end
    end
    $display("held: W=8 g1=%0d; W=16 g1=%0d g2=%0d g3=%0d", lvl8[1], lvl16[1], lvl16[2], lvl16[3]);
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
