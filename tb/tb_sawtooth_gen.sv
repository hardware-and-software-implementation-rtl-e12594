// tb_sawtooth_gen: checks the 14-bit test ramp.
//
// After reset the output must be -0x2000 (0x2000 as 14 bits). With the enable
// held high it must rise by one per cycle, wrap from +0x1FFF to -0x2000 and
// so repeat with a period of exactly 16384 cycles. With the enable low it must
// hold its value.
module tb_sawtooth_gen;

  logic        clk = 1'b0, rst, en;
  logic [13:0] dat;
  int          checks = 0, failures = 0;

  sawtooth_gen #(.WIDTH(14)) dut (.clk_i(clk), .rst_i(rst), .en(en), .dat_o(dat));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (dat=%h)", what, dat); end
  endtask

  initial begin
    int expected, wraps, last_wrap, period;
    logic [13:0] held;
    rst = 1; en = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(dat == 14'h2000, "reset value -0x2000");
    // hold with enable low
    repeat (5) @(posedge clk);
    #1 check(dat == 14'h2000, "holds while disabled");
    en = 1;
    expected = -8192; wraps = 0; last_wrap = -1; period = 0;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      @(posedge clk); #1;
      expected = (expected == 8191) ? -8192 : expected + 1;
      checks++;
      if ($signed(dat) != expected) begin
        failures++;
        $display("FAIL cyc %0d: got %0d expected %0d", cyc, $signed(dat), expected);
      end
      if (dat == 14'h2000) begin
        if (last_wrap >= 0) begin
          check(cyc - last_wrap == 16384, "ramp period 16384 cycles");
        end
        last_wrap = cyc;
        wraps++;
      end
    end
    check(wraps == 2, "two wraps seen in 40000 cycles");
    en = 0;
    @(posedge clk); #1;
    held = dat;
    repeat (3) @(posedge clk);
    #1 check(dat == held, "holds after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
