// tb_reset_gen: checks the power-on reset generator for several lengths.
//
// Three instances (RESET_CLKS = 2, the board's value, and 1 and 7) start
// together. Each output must be high from time zero for exactly RESET_CLKS
// rising clock edges and then stay low for the rest of the run.
module tb_reset_gen;

  logic clk = 1'b0;
  logic r2, r1, r7;
  int   checks = 0, failures = 0;

  reset_gen #(.RESET_CLKS(2)) dut2 (.clk_i(clk), .rst_o(r2));
  reset_gen #(.RESET_CLKS(1)) dut1 (.clk_i(clk), .rst_o(r1));
  reset_gen #(.RESET_CLKS(7)) dut7 (.clk_i(clk), .rst_o(r7));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1;
    check(r2 && r1 && r7, "all resets active at power-up");
    for (int edge_no = 1; edge_no <= 40; edge_no++) begin
      @(posedge clk); #1;
      check(r1 == (edge_no < 1), $sformatf("len 1 after edge %0d", edge_no));
      check(r2 == (edge_no < 2), $sformatf("len 2 after edge %0d", edge_no));
      check(r7 == (edge_no < 7), $sformatf("len 7 after edge %0d", edge_no));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
