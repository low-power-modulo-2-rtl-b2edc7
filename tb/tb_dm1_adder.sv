// Exhaustive test of dm1_adder at N = 8: for every pair of 8-bit vectors the
// weighted output must be (s + c + 1) mod 257, in 0..256.
module tb_dm1_adder;

  localparam int unsigned N = 8;
  localparam int unsigned M = (1 << N) + 1;

  logic         clk = 1'b0;
  logic [N-1:0] s, c;
  logic [N:0]   r;
  int unsigned  checks = 0, failures = 0;

  dm1_adder #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int unsigned i = 0; i < (1 << N); i++) begin
      for (int unsigned j = 0; j < (1 << N); j++) begin
        s = N'(i);
        c = N'(j);
        #1;
        checks++;
        if (int'(r) != (i + j + 1) % M) begin
          failures++;
          if (failures < 10) $display("ERROR: %0d + %0d + 1 -> %0d expected %0d", i, j, r, (i + j + 1) % M);
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
