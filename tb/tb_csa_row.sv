// Random and corner test of csa_row (W = 8 and W = 16): s + 2*c must equal
// x + y + z as integers, and s must be the bitwise parity.
module tb_csa_row;

  logic        clk = 1'b0;
  logic [7:0]  x8, y8, z8, s8, c8;
  logic [15:0] x16, y16, z16, s16, c16;
  int unsigned checks = 0, failures = 0;

  csa_row #(.W(8))  u8  (.x(x8),  .y(y8),  .z(z8),  .s(s8),  .c(c8));
  csa_row #(.W(16)) u16 (.x(x16), .y(y16), .z(z16), .s(s16), .c(c16));

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 3000; t++) begin
      x8 = 8'($urandom); y8 = 8'($urandom); z8 = 8'($urandom);
      x16 = 16'($urandom); y16 = 16'($urandom); z16 = 16'($urandom);
      if (t < 8) begin
        x8 = {8{t[0]}}; y8 = {8{t[1]}}; z8 = {8{t[2]}};
      end
      #1;
      checks++;
      if (int'(s8) + 2 * int'(c8) != int'(x8) + int'(y8) + int'(z8) || s8 !== (x8 ^ y8 ^ z8)) begin
        failures++;
        $display("ERROR: W=8 %h %h %h -> s=%h c=%h", x8, y8, z8, s8, c8);
      end
      checks++;
      if (int'(s16) + 2 * int'(c16) != int'(x16) + int'(y16) + int'(z16)) begin
        failures++;
        $display("ERROR: W=16 %h %h %h -> s=%h c=%h", x16, y16, z16, s16, c16);
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
