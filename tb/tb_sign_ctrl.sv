// Test of sign_ctrl for four groups (the published s_control1..4) and two
// groups: every nested hold pattern, with random hold[0]. The output must be
// one-hot at the highest group that is not held.
module tb_sign_ctrl;

  logic        clk = 1'b0;
  logic [3:0]  hold4, sctrl4;
  logic [1:0]  hold2, sctrl2;
  int unsigned checks = 0, failures = 0;

  sign_ctrl #(.G(4)) u4 (.hold(hold4), .sctrl(sctrl4));
  sign_ctrl #(.G(2)) u2 (.hold(hold2), .sctrl(sctrl2));

  always #5 clk = ~clk;

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int live = 0; live < 4; live++) begin   // highest live group
        hold4 = '0;
        for (int g = live + 1; g < 4; g++) hold4[g] = 1'b1;
        hold4[0] = rep[0];
        #1;
        checks++;
        if (sctrl4 !== 4'(1 << live)) begin
          failures++;
          $display("ERROR: G=4 hold=%b sctrl=%b expected live group %0d", hold4, sctrl4, live);
        end
      end
      for (int live = 0; live < 2; live++) begin
        hold2 = {live == 0, rep[1]};
        #1;
        checks++;
        if (sctrl2 !== 2'(1 << live)) begin
          failures++;
          $display("ERROR: G=2 hold=%b sctrl=%b", hold2, sctrl2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
