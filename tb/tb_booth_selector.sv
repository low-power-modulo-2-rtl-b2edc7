// Exhaustive test of both booth_selector types (BS+ and BS-) over the five
// legal Booth codes and both multiplicand bits. Expected bit: the selected
// multiple bit (a_m for |digit| 1, a_m1 for |digit| 2, 0 for a zero digit),
// complemented for a negative code, and complemented once more in a BS- cell.
module tb_booth_selector;
  import mdm_pkg::*;

  logic   clk = 1'b0;
  booth_t code;
  logic   a_m, a_m1, pp_p, pp_n;
  int unsigned checks = 0, failures = 0;

  booth_selector #(.INVERT(1'b0)) u_p (.code(code), .a_m(a_m), .a_m1(a_m1), .pp(pp_p));
  booth_selector #(.INVERT(1'b1)) u_n (.code(code), .a_m(a_m), .a_m1(a_m1), .pp(pp_n));

  always #5 clk = ~clk;

  initial begin
    for (int d = -2; d <= 2; d++) begin
      for (int v = 0; v < 4; v++) begin
        logic sel, e;
        {a_m, a_m1} = 2'(v);
        code.x1   = (d == 1 || d == -1);
        code.x2   = (d == 2 || d == -2);
        code.sign = (d <= 0);
        case (d)
          -2, 2:   sel = a_m1;
          -1, 1:   sel = a_m;
          default: sel = 1'b0;
        endcase
        e = (d <= 0) ? !sel : sel;
        #1;
        checks++;
        if (pp_p !== e) begin
          failures++;
          $display("ERROR: BS+ digit %0d a=%b got %b", d, v[1:0], pp_p);
        end
        checks++;
        if (pp_n !== !e) begin
          failures++;
          $display("ERROR: BS- digit %0d a=%b got %b", d, v[1:0], pp_n);
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
