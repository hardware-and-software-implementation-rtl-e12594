// tb_fab_fib_system: end-to-end test of the host FPGA, the bus transceiver
// and the converter-board CPLD together, plus the stand-alone CPLD program.
//
// The top runs with its defaults (200 MHz clock, 25 ns host wait, 16-bit
// dividers, 2-cycle power-on reset). The testbench plays the converter chips:
//  * Digital short: ADC 1 gets a new random sample every 64 cycles; by the end
//    of each window the DAC 1 pins must show its negation (the board's DAC
//    format), DAC 2 must stay at zero. The host must complete one transfer
//    every 16 cycles (80 ns, 12.5 MS/s) and a new ADC value must reach the DAC
//    pins within two transfers.
//  * Sawtooth: after the host is switched to its ramp, each write must put the
//    negated next ramp value on DAC 1, one write every 9 cycles.
//  * The converter clocks must run at 100 MHz (ADC) and 200 MHz (DAC) with the
//    reset divider constants, the switches at the signal connection.
//  * The stand-alone CPLD program must copy its ADC pins to its DAC pins one
//    cycle later and, in its sawtooth mode, ramp by one per cycle.
// At every turn of the transceiver, the driver facing it must have been off
// for at least half a clock period, and a driver may only come on half a
// period after the transceiver has turned away from it.
// Each mechanism (read transfer, write transfer, wait state, transceiver turn
// in both directions, digital-short update, sawtooth write, mode switch,
// self-test short and ramp) is counted; one that never happens is a failure.
module tb_fab_fib_system;
  import fab_pkg::*;

  logic       clk = 1'b0;
  logic       saw_mode, st_saw;
  sample_t    adc1, adc2, dac1, dac2, st_adc1, st_adc2, st_dac1, st_dac2;
  logic       adc1of, adc2of;
  logic       adc1clk, adc2clk, dac1clk, dac2clk, adc1shdn, adc2shdn, dac1slp, dac2slp, tp1, led, done;
  logic [3:0] adc1sw, adc2sw, st_sw1, st_sw2;
  logic       st_adc1clk, st_adc2clk, st_dac1clk, st_dac2clk, st_a1s, st_a2s, st_d1s, st_d2s;
  int         checks = 0, failures = 0;

  fab_fib_system dut (
    .clk_200(clk), .saw_mode(saw_mode),
    .adc1d(adc1), .adc2d(adc2), .adc1of(adc1of), .adc2of(adc2of), .dac1d(dac1), .dac2d(dac2),
    .adc1clk(adc1clk), .adc2clk(adc2clk), .dac1clk(dac1clk), .dac2clk(dac2clk),
    .adc1shdn(adc1shdn), .adc2shdn(adc2shdn), .dac1slp(dac1slp), .dac2slp(dac2slp),
    .adc1sw(adc1sw), .adc2sw(adc2sw), .tp1(tp1), .led(led), .xfer_done(done),
    .st_saw_mode(st_saw), .st_adc1d(st_adc1), .st_adc2d(st_adc2), .st_dac1d(st_dac1), .st_dac2d(st_dac2),
    .st_adc1clk(st_adc1clk), .st_adc2clk(st_adc2clk), .st_dac1clk(st_dac1clk), .st_dac2clk(st_dac2clk),
    .st_adc1sw(st_sw1), .st_adc2sw(st_sw2), .st_adc1shdn(st_a1s), .st_adc2shdn(st_a2s),
    .st_dac1slp(st_d1s), .st_dac2slp(st_d2s));

  always #2.5 clk = ~clk;   // 200 MHz

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic sample_t neg(input sample_t v);
    return sample_t'(-v);
  endfunction

  // ---------------------------------------------------------- mechanism counters
  int n_read = 0, n_write = 0, n_wait = 0, n_turn_board = 0, n_turn_fpga = 0;
  int n_short_update = 0, n_saw_write = 0, n_mode_switch = 0, n_st_short = 0, n_st_ramp = 0;
  logic prev_dir = 0, prev_strobe = 0;
  int   cyc = 0, last_done = -1;
  int   period_bad = 0, periods = 0;
  int   expected_period = 16;
  bit   period_check_on = 0;

  always @(posedge clk) begin
    #0.5;
    cyc++;
    if (dut.strobe && !prev_strobe) begin
      if (dut.rnw) n_read++; else n_write++;
    end
    if (dut.u_host.u_fsm.state == dut.u_host.u_fsm.S_WAIT) n_wait++;
    if (dut.ext_dir && !prev_dir) n_turn_board++;
    if (!dut.ext_dir && prev_dir) n_turn_fpga++;
    if (done) begin
      if (period_check_on && last_done >= 0) begin
        periods++;
        if (cyc - last_done != expected_period) begin
          period_bad++;
          $display("transfer period %0d, expected %0d", cyc - last_done, expected_period);
        end
      end
      last_done = cyc;
    end
    prev_dir = dut.ext_dir; prev_strobe = dut.strobe;
  end

  // ------------------------------------------------ driver turn-around margins
  // Each driver must be off for at least half a clock period before the one
  // facing it is turned on: CPLD driver vs transceiver (board side) and FPGA
  // driver vs transceiver (FPGA side).
  realtime t_cpld_off = 0, t_dir_low = 0, t_dir_high = 0, t_fpga_off = 0;
  int      n_margin = 0;
  bit      margins_on = 0;   // armed once the power-on resets are over
  initial begin repeat (4) @(posedge clk); margins_on = 1; end
  always @(negedge dut.u_cpld.drive_bus) t_cpld_off = $realtime;
  always @(negedge dut.u_host.u_fsm.en_write_to_bus) t_fpga_off = $realtime;
  always @(posedge dut.ext_dir) if (margins_on) begin
    t_dir_high = $realtime;
    check(!dut.u_cpld.drive_bus && $realtime - t_cpld_off >= 2.5,
          $sformatf("CPLD driver off %0.1f ns before transceiver turns to board", $realtime - t_cpld_off));
    check(!dut.u_host.u_fsm.en_write_to_bus, "FPGA driver off while transceiver turns to board");
    n_margin++;
  end
  always @(negedge dut.ext_dir) if (margins_on) begin
    t_dir_low = $realtime;
    check(!dut.u_host.u_fsm.en_write_to_bus && $realtime - t_fpga_off >= 2.5,
          $sformatf("FPGA driver off %0.1f ns before transceiver turns to FPGA", $realtime - t_fpga_off));
    n_margin++;
  end
  always @(posedge dut.u_cpld.drive_bus)
    if (margins_on && t_dir_low > 0) check(!dut.ext_dir && $realtime - t_dir_low >= 2.5, "CPLD driver on only after transceiver turned to FPGA");
  always @(posedge dut.u_host.u_fsm.en_write_to_bus)
    if (margins_on) check(dut.ext_dir && $realtime - t_dir_high >= 2.5, "FPGA driver on only after transceiver turned to board");

  // ------------------------------------------------------------ stand-alone CPLD
  initial begin
    sample_t p1, p2;
    st_saw = 0; st_adc1 = '0; st_adc2 = '0;
    repeat (6) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      #0.5 p1 = 14'($urandom); p2 = 14'($urandom); st_adc1 = p1; st_adc2 = p2;
      @(posedge clk); #0.5;
      check(st_dac1 == p1 && st_dac2 == p2, "self-test: ADC sample at DAC next cycle");
      n_st_short++;
    end
    @(negedge clk) st_saw = 1;
    @(posedge clk); #0.5 p1 = st_dac1;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #0.5;
      check(st_dac1 == sample_t'(p1 + 1'b1) && st_dac2 == st_dac1, "self-test: ramp step");
      p1 = st_dac1;
      n_st_ramp++;
    end
  end

  // ------------------------------------------------------------ main system
  initial begin
    sample_t v, ramp;
    int t_change, t_seen, rises, reads_before, got;
    logic pl;
    saw_mode = 0; adc1 = 14'h0000; adc2 = 14'h0155; adc1of = 0; adc2of = 0;
    repeat (4) @(posedge clk);
    check(adc1sw == SW_SIGNAL && adc2sw == SW_SIGNAL, "switches at signal connection");
    check(!adc1shdn && !adc2shdn && !dac1slp && !dac2slp, "converters powered");
    // converter clocks over 100 main cycles
    rises = 0; pl = adc1clk;
    for (int i = 0; i < 400; i++) begin
      #1.25;
      if (adc1clk && !pl) rises++;
      pl = adc1clk;
      if (dac1clk !== clk || dac2clk !== clk) begin check(0, "DAC clocks follow main clock"); break; end
      if (adc2clk !== adc1clk) begin check(0, "ADC clocks equal"); break; end
    end
    check(rises == 50, $sformatf("ADC clocks at 100 MHz: %0d edges in 100 cycles", rises));

    // digital short
    period_check_on = 1; expected_period = 16;
    for (int w = 0; w < 60; w++) begin
      @(negedge clk);
      v = 14'($urandom);
      if (w == 5) v = 14'h2000;       // most negative sample
      if (w == 6) v = 14'h1FFF;       // most positive sample
      adc1 = v; adc2 = 14'($urandom);
      t_change = cyc; t_seen = -1;
      for (int c = 0; c < 64; c++) begin
        @(posedge clk); #1;
        if (t_seen < 0 && dac1 == neg(v)) begin t_seen = cyc; n_short_update++; end
      end
      check(dac1 == neg(v), $sformatf("DAC1 = -ADC1: adc %h dac %h", v, dac1));
      check(t_seen >= 0 && t_seen - t_change <= 32, $sformatf("ADC1 to DAC1 within two transfers (%0d cycles)", t_seen - t_change));
      check(dac2 == 14'h0000, "DAC2 untouched");
    end
    check(periods > 100 && period_bad == 0, $sformatf("digital short period 16 cycles (%0d bad of %0d)", period_bad, periods));

    // sawtooth mode, switched during a write's wait state
    wait (dut.u_host.u_fsm.state == dut.u_host.u_fsm.S_WAIT && !dut.rnw);
    @(negedge clk) saw_mode = 1; n_mode_switch++;
    period_check_on = 0; last_done = -1; periods = 0; period_bad = 0; expected_period = 9;
    ramp = 14'h2000;
    reads_before = n_read;
    got = 0;
    begin
      // first write after the switch carries -0x2000
      while (got < 200) begin
        @(posedge clk); #1;
        if (done) begin
          period_check_on = 1;
          // value reaches the DAC pins a few cycles after the write strobe
          repeat (6) @(posedge clk);
          #1;
          check(dac1 == neg(ramp), $sformatf("sawtooth: DAC1 %h expected %h", dac1, neg(ramp)));
          n_saw_write++;
          ramp = ramp + 1'b1;
          got++;
        end
      end
      check(n_read == reads_before, "no reads in sawtooth mode");
    end
    check(periods > 100 && period_bad == 0, $sformatf("sawtooth period 9 cycles (%0d bad of %0d)", period_bad, periods));

    // back to the digital short
    @(negedge clk) saw_mode = 0; n_mode_switch++;
    period_check_on = 0;
    adc1 = 14'h0AAA;
    repeat (64) @(posedge clk);
    #1 check(dac1 == neg(14'h0AAA), "digital short after mode switch");

    // every mechanism must have happened
    check(n_read > 0,         $sformatf("read transfers: %0d", n_read));
    check(n_write > 0,        $sformatf("write transfers: %0d", n_write));
    check(n_wait > 0,         $sformatf("wait-state cycles: %0d", n_wait));
    check(n_turn_board > 0,   $sformatf("transceiver turned towards board: %0d", n_turn_board));
    check(n_turn_fpga > 0,    $sformatf("transceiver turned towards FPGA: %0d", n_turn_fpga));
    check(n_short_update > 0, $sformatf("digital-short updates: %0d", n_short_update));
    check(n_saw_write > 0,    $sformatf("sawtooth writes: %0d", n_saw_write));
    check(n_mode_switch >= 2, $sformatf("mode switches: %0d", n_mode_switch));
    check(n_st_short > 0,     $sformatf("self-test short samples: %0d", n_st_short));
    check(n_st_ramp > 0,      $sformatf("self-test ramp steps: %0d", n_st_ramp));
    check(n_margin > 0,       $sformatf("turn-around margins checked: %0d", n_margin));
    $display("mechanisms: read %0d write %0d wait %0d turn->board %0d turn->fpga %0d short %0d saw %0d switch %0d st_short %0d st_ramp %0d",
             n_read, n_write, n_wait, n_turn_board, n_turn_fpga, n_short_update, n_saw_write, n_mode_switch, n_st_short, n_st_ramp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
