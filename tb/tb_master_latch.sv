// Test of master_latch (W = 8, NIN = 3): random operands with a random load
// enable. After each edge q must hold the operands of the last loaded cycle
// and valid must equal the load of that edge; valid must be 0 under reset.
module tb_master_latch;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         load = 1'b0;
  logic [W-1:0] d [3];
  logic [W-1:0] q [3];
  logic         valid;
  logic [W-1:0] model [3];
  int unsigned  checks = 0, failures = 0;

  master_latch #(.W(W), .NIN(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    d = '{default: '0};
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (valid !== 1'b0) begin failures++; $display("ERROR: valid set in reset"); end
    rst_n = 1'b1;
    load  = 1'b1;
    for (int k = 0; k < 3; k++) d[k] = W'($urandom);
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (valid !== load) begin failures++; $display("ERROR: valid=%b load=%b", valid, load); end
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (q[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("ERROR: q[%0d]=%h expected %h", k, q[k], model[k]);
        end
      end
      load = ($urandom_range(3) != 0);
      for (int k = 0; k < 3; k++) d[k] = W'($urandom);
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
