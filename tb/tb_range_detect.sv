// Test of range_detect at the published 16-bit size (W = 16, GW = 4, two
// operands A and B) and at the multiplier's stage size (W = 8, three
// operands). Operands are random values sign-extended from a random width,
// so every hold level occurs. Expected: hold[g] = 1 exactly when, in every
// operand, all bits from the top of the word down to bit g*GW-1 are equal;
// hold[0] = 0. Counts each level.
module tb_range_detect;

  logic        clk = 1'b0;
  logic [15:0] ops16 [2];
  logic [3:0]  hold16;
  logic [7:0]  ops8 [3];
  logic [1:0]  hold8;
  int unsigned lvl16 [4];
  int unsigned lvl8 [2];
  int unsigned checks = 0, failures = 0;

  range_detect #(.W(16), .GW(4), .NIN(2)) u16 (.ops(ops16), .hold(hold16));
  range_detect #(.W(8),  .GW(4), .NIN(3)) u8  (.ops(ops8),  .hold(hold8));

  always #5 clk = ~clk;

  // Random W-bit value whose bits above `keep` copy bit keep-1.
  function automatic logic [15:0] sext(input int keep);
    logic [15:0] v;
    v = 16'($urandom);
    for (int i = keep; i < 16; i++) v[i] = v[keep-1];
    return v;
  endfunction

  function automatic logic all_equal(input logic [15:0] v, input int hi, input int lo);
    for (int i = lo; i <= hi; i++) if (v[i] != v[lo]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic [3:0] e16;
      logic [1:0] e8;
      for (int k = 0; k < 2; k++) ops16[k] = sext($urandom_range(1, 16));
      for (int k = 0; k < 3; k++) ops8[k] = 8'(sext($urandom_range(1, 8)));
      #1;
      e16 = '0;
      for (int g = 1; g < 4; g++) begin
        e16[g] = 1'b1;
        for (int k = 0; k < 2; k++) e16[g] = e16[g] & all_equal(ops16[k], 15, 4 * g - 1);
        if (e16[g]) lvl16[g]++;
      end
      e8 = '0;
      e8[1] = 1'b1;
      for (int k = 0; k < 3; k++) e8[1] = e8[1] & all_equal({8'h0, ops8[k]}, 7, 3);
      if (e8[1]) lvl8[1]++;
      checks++;
      if (hold16 !== e16) begin
        failures++;
        if (failures < 10) $display("ERROR: W=16 %h %h hold=%b expected %b", ops16[0], ops16[1], hold16, e16);
      end
      checks++;
      if (hold8 !== e8) begin
        failures++;
        if (failures < 10) $display("ERROR: W=8 hold=%b expected %b", hold8, e8);
      end
    end
    for (int g = 1; g < 4; g++) begin
      checks++;
      if (lvl16[g] == 0) begin failures++; $display("ERROR: W=16 level %0d never seen", g); end
    end
    checks++;
    if (lvl8[1] == 0) begin failures++; $display("ERROR: W=8 hold never seen"); end
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
