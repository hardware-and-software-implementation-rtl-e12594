// tb_sync_2ff: checks the two-flip-flop synchroniser.
//
// A random 8-bit stream is applied, changing just after each rising clock
// edge. After each edge q must equal the input sampled at the edge before,
// i.e. a value reaches q on the second rising edge after it was applied.
module tb_sync_2ff;

  logic       clk = 1'b0;
  logic [7:0] d, q;
  logic [7:0] hist [0:2];
  int         checks = 0, failures = 0;

  sync_2ff #(.WIDTH(8)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'h00;
    for (int i = 0; i < 3; i++) hist[i] = 8'h00;
    repeat (3) @(posedge clk);
    for (int cyc = 0; cyc < 500; cyc++) begin
      #1 d = 8'($urandom);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      @(posedge clk); #1;
      // after this edge: d of this cycle is in the first stage, q holds
      // d of the cycle before
      checks++;
      if (q !== hist[1]) begin
        failures++;
        $display("FAIL cyc %0d: d=%h q=%h expected %h", cyc, d, q, hist[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
