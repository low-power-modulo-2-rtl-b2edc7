// Exhaustive test of booth_encoder: all 8 triplets with and without the
// multiplicand zero flag. The expected code is taken from the Booth digit
// -2*b_hi + b_mid + b_lo: x1 for |digit| = 1, x2 for |digit| = 2, sign for a
// negative or zero digit; with a_zero set, x1 = x2 = 0 and sign = 1.
module tb_booth_encoder;
  import mdm_pkg::*;

  logic   clk = 1'b0;
  logic   b_hi, b_mid, b_lo, a_zero;
  booth_t code;
  int unsigned checks = 0, failures = 0;

  booth_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int v = 0; v < 16; v++) begin
      int digit;
      logic e_x1, e_x2, e_sign;
      {a_zero, b_hi, b_mid, b_lo} = 4'(v);
      digit  = -2 * int'(b_hi) + int'(b_mid) + int'(b_lo);
      e_x1   = !a_zero && (digit == 1 || digit == -1);
      e_x2   = !a_zero && (digit == 2 || digit == -2);
      e_sign = a_zero || digit <= 0;
      #1;
      checks++;
      if (code.x1 !== e_x1 || code.x2 !== e_x2 || code.sign !== e_sign) begin
        failures++;
        $display("ERROR: az=%0d triplet=%0d%0d%0d got s/2x/1x=%b expected %b%b%b",
                 a_zero, b_hi, b_mid, b_lo, code, e_sign, e_x2, e_x1);
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
