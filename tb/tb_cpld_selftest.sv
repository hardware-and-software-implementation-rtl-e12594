// tb_cpld_selftest: checks the stand-alone CPLD test routines.
//
// Digital short: random ADC samples must appear at the DAC pins one clock
// later, unchanged; the ADC clocks must run at half the main clock and the
// DAC clocks at the main clock. Sawtooth: both DACs must ramp up by one per
// cycle and wrap from +0x1FFF to -0x2000 with a period of 16384 cycles
// (81.92 us at 200 MHz). The switches must sit at the signal connection and
// the converters must be powered.
module tb_cpld_selftest;
  import fab_pkg::*;

  logic       clk = 1'b0, saw;
  sample_t    adc1, adc2, dac1, dac2;
  logic       adc1clk, adc2clk, dac1clk, dac2clk, a1s, a2s, d1s, d2s;
  logic [3:0] sw1, sw2;
  int         checks = 0, failures = 0;

  cpld_selftest dut (
    .clk_i(clk), .saw_mode(saw), .adc1d(adc1), .adc2d(adc2), .dac1d(dac1), .dac2d(dac2),
    .adc1clk(adc1clk), .adc2clk(adc2clk), .dac1clk(dac1clk), .dac2clk(dac2clk),
    .adc1sw(sw1), .adc2sw(sw2), .adc1shdn(a1s), .adc2shdn(a2s), .dac1slp(d1s), .dac2slp(d2s));

  always #2.5 clk = ~clk;   // 200 MHz

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    sample_t p1, p2;
    int last_wrap, wraps, rises, prev_level;
    realtime t_wrap0;
    saw = 0; adc1 = '0; adc2 = '0;
    repeat (4) @(posedge clk);
    check(sw1 == 4'h4 && sw2 == 4'h4 && !a1s && !a2s && !d1s && !d2s, "static pins");
    // digital short
    for (int i = 0; i < 200; i++) begin
      #0.5 p1 = 14'($urandom); p2 = 14'($urandom); adc1 = p1; adc2 = p2;
      @(posedge clk); #0.5;
      check(dac1 == p1 && dac2 == p2, "ADC sample at DAC one cycle later");
    end
    // clock rates: count rising edges over 100 main cycles
    rises = 0; prev_level = adc1clk;
    for (int i = 0; i < 400; i++) begin   // 400 x 1.25 ns = 100 main cycles
      #1.25;
      if (adc1clk && !prev_level) rises++;
      prev_level = adc1clk;
      check(dac1clk == clk && dac2clk == clk, "DAC clocks = main clock");
      check(adc2clk == adc1clk, "both ADC clocks equal");
    end
    check(rises == 50, $sformatf("ADC clock 100 MHz: %0d rising edges in 100 cycles", rises));
    // sawtooth
    @(negedge clk) saw = 1;
    wraps = 0; last_wrap = -1;
    for (int c = 0; c < 40000; c++) begin
      @(posedge clk); #0.5;
      if (c > 2) begin
        checks++;
        if (dac1 != dac2 || !(dac1 == p1 + 1'b1)) begin
          failures++;
          if (failures < 10) $display("FAIL: ramp step %h -> %h", p1, dac1);
        end
      end
      if (dac1 == 14'h2000) begin
        if (last_wrap >= 0) begin
          check(c - last_wrap == 16384, "ramp period 16384 cycles");
          check($realtime - t_wrap0 == 81920.0, $sformatf("ramp period 81.92 us, got %0t", $realtime - t_wrap0));
        end
        last_wrap = c; t_wrap0 = $realtime;
        wraps++;
      end
      p1 = dac1;
    end
    check(wraps >= 2, "ramp wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
