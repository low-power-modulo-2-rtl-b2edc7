// Test of sign_gen at W = 16, GW = 4 (S[15], S[11], S[7], S[3]) and at
// W = 8: random words with each one-hot select; the sign must be the top bit
// of the selected group.
module tb_sign_gen;

  logic        clk = 1'b0;
  logic [15:0] vec16;
  logic [3:0]  sctrl16;
  logic        sign16;
  logic [7:0]  vec8;
  logic [1:0]  sctrl8;
  logic        sign8;
  int unsigned checks = 0, failures = 0;

  sign_gen #(.W(16), .GW(4)) u16 (.vec(vec16), .sctrl(sctrl16), .sign(sign16));
  sign_gen #(.W(8),  .GW(4)) u8  (.vec(vec8),  .sctrl(sctrl8),  .sign(sign8));

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int g4, g2;
      vec16   = 16'($urandom);
      vec8    = 8'($urandom);
      g4      = t % 4;
      g2      = t % 2;
      sctrl16 = 4'(1 << g4);
      sctrl8  = 2'(1 << g2);
      #1;
      checks++;
      if (sign16 !== vec16[4*g4+3]) begin failures++; $display("ERROR: W=16 g=%0d", g4); end
      checks++;
      if (sign8 !== vec8[4*g2+3]) begin failures++; $display("ERROR: W=8 g=%0d", g2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
