// Test of bit_restore at W = 16, GW = 4: random words, hold patterns and sign.
// Each held group g >= 1 must read all-sign, every other group (group 0
// always) must pass unchanged.
module tb_bit_restore;

  logic        clk = 1'b0;
  logic [15:0] vec, out;
  logic [3:0]  hold;
  logic        sign;
  int unsigned checks = 0, failures = 0;

  bit_restore #(.W(16), .GW(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 2000; t++) begin
      vec  = 16'($urandom);
      hold = 4'($urandom);
      sign = 1'($urandom);
      #1;
      for (int g = 0; g < 4; g++) begin
        logic [3:0] e;
        e = (g > 0 && hold[g]) ? {4{sign}} : vec[4*g +: 4];
        checks++;
        if (out[4*g +: 4] !== e) begin
          failures++;
          if (failures < 10) $display("ERROR: vec=%h hold=%b sign=%b out=%h", vec, hold, sign, out);
        end
      end
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
