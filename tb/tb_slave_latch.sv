// Test of slave_latch with W = 16, GW = 4, NIN = 2 (the sizes of the published
// 16-bit drawing): random operands, load and nested hold patterns. A bit
// model per group says what q must hold: group 0 follows every load, group
// g >= 1 only loads whose hold[g] is 0. hold_q must be the hold vector of the
// last load, valid the load of the last edge. Counts each group's holds.
module tb_slave_latch;

  localparam int unsigned W  = 16;
  localparam int unsigned GW = 4;
  localparam int unsigned G  = W / GW;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         load = 1'b0;
  logic [G-1:0] hold = '0;
  logic [W-1:0] d [2];
  logic [W-1:0] q [2];
  logic [G-1:0] hold_q;
  logic         valid;
  logic [W-1:0] model [2];
  logic [G-1:0] mhold;
  int unsigned  held [G];
  int unsigned  checks = 0, failures = 0;

  slave_latch #(.W(W), .GW(GW), .NIN(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    d = '{default: '0};
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (valid !== 1'b0 || hold_q !== '0) begin failures++; $display("ERROR: reset state"); end
    rst_n = 1'b1;
    load  = 1'b1;
    @(posedge clk);
    model = d;
    mhold = '0;
    for (int t = 0; t < 3000; t++) begin
      int lvl;
      load = ($urandom_range(4) != 0);
      lvl  = $urandom_range(G - 1);                 // groups lvl..G-1 held
      hold = '0;
      for (int g = 1; g < G; g++) if (g >= lvl && lvl > 0) hold[g] = 1'b1;
      for (int k = 0; k < 2; k++) d[k] = W'($urandom);
      @(posedge clk);
      if (load) begin
        mhold = hold;
        for (int g = 0; g < G; g++) begin
          if (g == 0 || !hold[g]) for (int k = 0; k < 2; k++) model[k][g*GW +: GW] = d[k][g*GW +: GW];
          else held[g]++;
        end
      end
      #1;
      checks++;
      if (valid !== load || hold_q !== mhold) begin
        failures++;
        if (failures < 10) $display("ERROR: valid=%b hold_q=%b expected %b %b", valid, hold_q, load, mhold);
      end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (q[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("ERROR: q[%0d]=%h expected %h", k, q[k], model[k]);
        end
      end
    end
    for (int g = 1; g < G; g++) begin
      checks++;
      if (held[g] == 0) begin failures++; $display("ERROR: group %0d never held", g); end
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
