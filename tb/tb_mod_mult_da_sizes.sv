// The multiplier at the other word sizes the published results cover:
// N = 4 (groups of 2, since a 4-bit word has only one 4-bit group; all
// 17 x 17 operand pairs, then random ones), N = 16
// and N = 32 (groups of 4). Each size runs corner and random operands through
// mm_harness, which checks products and latency; each size must also show
// at least one held bit group.
module tb_mod_mult_da_sizes;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d4, d16, d32;
  int unsigned c4, c16, c32, f4, f16, f32, s4, s16, s32;
  int unsigned checks, failures;

  mm_harness #(.N(4),  .GW(2), .NOPS(3000), .EXH(1'b1)) h4  (.clk, .rst_n, .done(d4),  .checks(c4),  .failures(f4),  .skips(s4));
  mm_harness #(.N(16), .GW(4), .NOPS(3000)) h16 (.clk, .rst_n, .done(d16), .checks(c16), .failures(f16), .skips(s16));
  mm_harness #(.N(32), .GW(4), .NOPS(3000)) h32 (.clk, .rst_n, .done(d32), .checks(c32), .failures(f32), .skips(s32));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (d4 && d16 && d32);
    @(posedge clk);
    checks   = c4 + c16 + c32 + 3;
    failures = f4 + f16 + f32;
    if (s4 == 0)  begin failures++; $display("ERROR: N=4 never held a group"); end
    if (s16 == 0) begin failures++; $display("ERROR: N=16 never held a group"); end
    if (s32 == 0) begin failures++; $display("ERROR: N=32 never held a group"); end
    $display("held-group results: N=4 %0d, N=16 %0d, N=32 %0d", s4, s16, s32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16 + c32, f4 + f16 + f32 + 1);
    $finish;
  end

endmodule
