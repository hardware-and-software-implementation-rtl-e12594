// tb_clk_divider: self-checking test of the programmable clock divider.
//
// For the constants 0, 1, 2, 3, 4, 5, 10 and 0x0100 the output is sampled in
// the middle of every input cycle (falling input edge). Constant 0 must give a
// constant low, constant 1 must follow the input clock in both phases, and
// n >= 2 must give a period of exactly n input cycles with floor(n/2) of them
// high. A change of constant without reset is also checked.
module tb_clk_divider;

  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] div;
  logic        clk_o;
  int          checks = 0, failures = 0;

  clk_divider #(.WIDTH(16)) dut (.clk_i(clk), .rst_i(rst), .div_i(div), .clk_o(clk_o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (div=%0d)", what, div);
    end
  endtask

  // Measure period and high time of clk_o over several periods.
  task automatic measure(input int n);
    int last_rise, rises, highs, cyc;
    logic prev;
    last_rise = -1; rises = 0; highs = 0; prev = clk_o;
    // let the divider settle for two periods
    repeat (2 * n) @(negedge clk);
    prev = clk_o;
    for (cyc = 0; cyc < 6 * n; cyc++) begin
      @(negedge clk);
      if (clk_o && !prev) begin
        if (last_rise >= 0) check(cyc - last_rise == n, "period");
        last_rise = cyc;
        rises++;
      end
      if (rises >= 1 && rises <= 3 && clk_o) highs++;
      prev = clk_o;
    end
    check(rises >= 5, "enough rising edges");
    // three complete periods were counted between rising edges 1 and 4
    check(highs == 3 * (n / 2), "high time");
  endtask

  initial begin
    int ns[8] = '{0, 1, 2, 3, 4, 5, 10, 256};
    rst = 1'b1; div = 16'd0;
    foreach (ns[i]) begin
      rst = 1'b1; div = 16'(ns[i]);
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      if (ns[i] == 0) begin
        bit all_low;
        all_low = 1'b1;
        repeat (40) begin @(negedge clk); if (clk_o) all_low = 1'b0; #2 if (clk_o) all_low = 1'b0; end
        check(all_low, "constant 0 holds output low");
      end else if (ns[i] == 1) begin
        repeat (20) begin
          @(posedge clk); #1 check(clk_o == 1'b1, "constant 1 passes high phase");
          @(negedge clk); #1 check(clk_o == 1'b0, "constant 1 passes low phase");
        end
      end else begin
        measure(ns[i]);
      end
    end
    // change the constant on the fly from 10 to 4
    rst = 1'b1; div = 16'd10;
    @(posedge clk); #1 rst = 1'b0;
    repeat (37) @(posedge clk);
    #1 div = 16'd4;
    measure(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
