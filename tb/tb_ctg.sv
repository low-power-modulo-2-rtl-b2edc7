// Test of ctg (N = 8): random digit patterns; bit 2i of the correction vector
// must be 1 exactly when digit i is zero, and every odd bit must be 0.
module tb_ctg;
  import mdm_pkg::*;

  localparam int unsigned N = 8;

  logic         clk = 1'b0;
  booth_t       code [N/2];
  logic [N-1:0] corr;
  int unsigned  checks = 0, failures = 0;

  ctg #(.N(N)) dut (.code(code), .corr(corr));

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int          dig [N/2];
      logic [N-1:0] e;
      e = '0;
      for (int i = 0; i < N / 2; i++) begin
        dig[i]       = (t < 625) ? ((t / (5 ** i)) % 5) - 2 : int'($urandom_range(4)) - 2;
        code[i].x1   = (dig[i] == 1 || dig[i] == -1);
        code[i].x2   = (dig[i] == 2 || dig[i] == -2);
        code[i].sign = (dig[i] < 0) || (dig[i] == 0 && $urandom_range(1) == 1);
        if (dig[i] == 0) e[2*i] = 1'b1;
      end
      #1;
      checks++;
      if (corr !== e) begin
        failures++;
        if (failures < 10) $display("ERROR: corr=%b expected %b", corr, e);
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
