// tb_fab_fib_system_xcvr_delay: the host-to-board link with a slow bus
// transceiver.
//
// Same system as the end-to-end test, but the transceiver model delays data
// and direction by 5 ns, a whole clock period (5 ns is the delay of the
// timed variant of the original transceiver model). The host's wait state
// exists to cover this delay. Two routines are run:
//  * digital short: an ADC 1 sample must come back negated on the DAC 1 pins
//    at most 25 cycles after it changed. That is one 16-cycle transfer period
//    plus the 9 cycles from the read's sampling of the bus to the DAC pins;
//    a stale bus value would add a whole period;
//  * sawtooth: each write must put the negated ramp value on DAC 1.
// The transfer periods must stay at 16 and 9 cycles: the delay may cost no
// cycle.
module tb_fab_fib_system_xcvr_delay;
  import fab_pkg::*;

  logic       clk;
  logic       saw_mode;
  sample_t    adc1, adc2, dac1, dac2, st_dac1, st_dac2;
  logic       done;
  int         checks = 0, failures = 0;
  int         cyc = 0, last_done = -1, period_bad = 0, periods = 0, expected_period = 16;
  bit         period_check_on = 0;

  fab_fib_system #(.XCVR_DELAY(5ns)) dut (
    .clk_200(clk), .saw_mode(saw_mode),
    .adc1d(adc1), .adc2d(adc2), .adc1of(1'b0), .adc2of(1'b0), .dac1d(dac1), .dac2d(dac2),
    .adc1clk(), .adc2clk(), .dac1clk(), .dac2clk(),
    .adc1shdn(), .adc2shdn(), .dac1slp(), .dac2slp(),
    .adc1sw(), .adc2sw(), .tp1(), .led(), .xfer_done(done),
    .st_saw_mode(1'b0), .st_adc1d(14'h0000), .st_adc2d(14'h0000), .st_dac1d(st_dac1), .st_dac2d(st_dac2),
    .st_adc1clk(), .st_adc2clk(), .st_dac1clk(), .st_dac2clk(),
    .st_adc1sw(), .st_adc2sw(), .st_adc1shdn(), .st_adc2shdn(),
    .st_dac1slp(), .st_dac2slp());

  initial begin
    clk = 1'b0;
    forever #2.5 clk = ~clk;   // 200 MHz
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) begin
    #0.5;
    cyc++;
    if (done) begin
      if (period_check_on && last_done >= 0) begin
        periods++;
        if (cyc - last_done != expected_period) period_bad++;
      end
      last_done = cyc;
    end
  end

  initial begin
    sample_t v, ramp;
    int got, t_change, t_seen;
    saw_mode = 0; adc1 = 14'h0000; adc2 = 14'h0000;
    repeat (4) @(posedge clk);
    period_check_on = 1;
    for (int w = 0; w < 40; w++) begin
      repeat ($urandom_range(0, 15)) @(posedge clk);   // random phase against the transfers
      @(negedge clk);
      v = 14'($urandom);
      adc1 = v;
      t_change = cyc; t_seen = -1;
      for (int c = 0; c < 64; c++) begin
        @(posedge clk); #1;
        if (t_seen < 0 && dac1 == sample_t'(-v)) t_seen = cyc;
      end
      check(t_seen >= 0 && t_seen - t_change <= 25, $sformatf("ADC1 to DAC1 within 25 cycles (%0d)", t_seen - t_change));
      check(dac1 == sample_t'(-v), $sformatf("DAC1 = -ADC1 through slow transceiver: adc %h dac %h", v, dac1));
    end
    check(periods > 100 && period_bad == 0, $sformatf("digital short period 16 (%0d bad of %0d)", period_bad, periods));

    wait (dut.u_host.u_fsm.state == dut.u_host.u_fsm.S_WAIT && !dut.rnw);
    @(negedge clk) saw_mode = 1;
    period_check_on = 0; last_done = -1; periods = 0; period_bad = 0; expected_period = 9;
    ramp = 14'h2000;
    got = 0;
    while (got < 100) begin
      @(posedge clk); #1;
      if (done) begin
        period_check_on = 1;
        repeat (6) @(posedge clk);
        #1 check(dac1 == sample_t'(-ramp), $sformatf("sawtooth through slow transceiver: %h expected %h", dac1, sample_t'(-ramp)));
        ramp = ramp + 1'b1;
        got++;
      end
    end
    check(periods > 50 && period_bad == 0, $sformatf("sawtooth period 9 (%0d bad of %0d)", period_bad, periods));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
