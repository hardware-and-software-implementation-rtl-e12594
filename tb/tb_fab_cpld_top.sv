// tb_fab_cpld_top: drives the converter board's CPLD logic through its host bus.
//
// A host model in this testbench performs register reads and writes with the
// same line sequence as the host FPGA (address and read/not-write first, then
// the data driver, then a one-cycle strobe) and checks:
//  * reset values of all registers after power-on reset;
//  * read latency: read data is on the bus three rising edges after the edge
//    that raised the strobe (two synchroniser stages plus the registered read);
//  * ADC samples and out-of-range flags in the read-only registers, with the
//    two upper bits of the value registers zero;
//  * DAC registers reach the DAC pins as the negated 14-bit value;
//  * control register fields on the switch and power-down pins;
//  * converter clock frequencies for divider constants 2, 1, 5 and 0;
//  * the soft reset bit restores all registers and clears itself;
//  * the CPLD never drives the data bus while the host does;
//  * the acknowledge line stays low and the test-pin blinker divides by 10.
module tb_fab_cpld_top;
  import fab_pkg::*;

  logic        clk = 1'b0;
  wire  [15:0] fibd;
  adr_t        fiba;
  logic        rnw, strobe, ack;
  sample_t     adc1d, adc2d, dac1d, dac2d;
  logic        adc1of, adc2of;
  logic        adc1clk, adc2clk, dac1clk, dac2clk;
  logic        adc1shdn, adc2shdn, dac1slp, dac2slp, tp1;
  logic [3:0]  adc1sw, adc2sw;
  logic        host_en;
  word_t       host_data;
  int          checks = 0, failures = 0, overlaps = 0;

  fab_cpld_top dut (
    .fibclk(clk), .fibd(fibd), .fiba(fiba), .fibrnw(rnw), .fibstrobe(strobe), .fiback(ack),
    .adc1d(adc1d), .adc2d(adc2d), .dac1d(dac1d), .dac2d(dac2d), .adc1of(adc1of), .adc2of(adc2of),
    .adc1clk(adc1clk), .adc2clk(adc2clk), .dac1clk(dac1clk), .dac2clk(dac2clk),
    .adc1shdn(adc1shdn), .adc2shdn(adc2shdn), .dac1slp(dac1slp), .dac2slp(dac2slp),
    .adc1sw(adc1sw), .adc2sw(adc2sw), .tp1(tp1));

  assign fibd = host_en ? host_data : 16'hzzzz;

  always #5 clk = ~clk;

  always @(posedge clk) if (host_en && dut.drive_bus) overlaps++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Host write: address and rnw = 0, one cycle later the data driver, one
  // cycle later a one-cycle strobe; data held for four more cycles.
  task automatic host_write(input adr_t a, input word_t v);
    @(posedge clk); #1 fiba = a; rnw = 1'b0; strobe = 1'b0;
    @(posedge clk); #1;                       // transceiver turns
    @(posedge clk); #1 host_en = 1'b1; host_data = v;
    @(posedge clk); #1 strobe = 1'b1;
    @(posedge clk); #1 strobe = 1'b0;
    repeat (4) @(posedge clk);
    #1 host_en = 1'b0;
  endtask

  // Host read: returns the bus value and the number of rising edges after
  // the strobe edge at which the expected value first appeared.
  task automatic host_read(input adr_t a, input word_t exp, output word_t v, output int lat);
    @(posedge clk); #1 host_en = 1'b0; fiba = a; rnw = 1'b1;
    repeat (3) @(posedge clk);                 // let the CPLD take the bus
    @(posedge clk); #1 strobe = 1'b1;          // strobe edge = edge 0
    lat = -1;
    for (int e = 1; e <= 6; e++) begin
      @(posedge clk); #1;
      if (e == 1) strobe = 1'b0;
      if (lat < 0 && fibd === exp) lat = e;
    end
    v = fibd;
  endtask

  task automatic read_check(input adr_t a, input word_t exp, input string what);
    word_t v; int lat;
    host_read(a, exp, v, lat);
    check(v == exp, $sformatf("%s: read 0x%02h got %h expected %h", what, a, v, exp));
  endtask

  // Period of a clock output in fibclk cycles (rising edge to rising edge).
  task automatic clk_period(ref logic c, output int per);
    int t0, n;
    logic prev;
    per = 0; n = 0; t0 = -1; prev = c;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      if (c && !prev) begin
        if (t0 >= 0) begin per = i - t0; n++; if (n == 2) break; end
        t0 = i;
      end
      prev = c;
    end
  endtask

  initial begin
    word_t v; int lat, per;
    host_en = 0; host_data = '0; fiba = '0; rnw = 1; strobe = 0;
    adc1d = 14'h0ABC; adc2d = 14'h3FFF; adc1of = 0; adc2of = 1;
    repeat (6) @(posedge clk);

    // ---- reset values
    read_check(ADR_CTRL, 16'h4400, "CTRL reset value");
    read_check(ADR_DAC1_VAL, 16'h0000, "DAC1 reset value");
    read_check(ADR_DAC2_VAL, 16'h0000, "DAC2 reset value");
    read_check(ADR_ADC1_CLKDIV, 16'h0002, "ADC1 divider reset value");
    read_check(ADR_ADC2_CLKDIV, 16'h0002, "ADC2 divider reset value");
    read_check(ADR_DAC1_CLKDIV, 16'h0001, "DAC1 divider reset value");
    read_check(ADR_DAC2_CLKDIV, 16'h0001, "DAC2 divider reset value");
    check(adc1sw == 4'h4 && adc2sw == 4'h4, "switches at signal connection after reset");
    check(!adc1shdn && !adc2shdn && !dac1slp && !dac2slp, "converters powered after reset");

    // ---- read latency: value differs from the last read
    host_read(ADR_ADC1_VAL, 16'h0ABC, v, lat);
    check(v == 16'h0ABC, "ADC1 value");
    check(lat == 3, $sformatf("read latency 3 edges, got %0d", lat));
    read_check(ADR_ADC2_VAL, 16'h3FFF, "ADC2 value, upper bits zero");
    read_check(ADR_STAT, 16'h0008, "STAT: OTR2 set, OTR1 clear");
    adc1of = 1; adc2of = 0;
    read_check(ADR_STAT, 16'h0004, "STAT: OTR1 set, OTR2 clear");

    // ---- DAC values
    host_write(ADR_DAC1_VAL, 16'hC123);
    check(dac1d == 14'(-14'sh0123), $sformatf("DAC1 pins negated value, got %h", dac1d));
    read_check(ADR_DAC1_VAL, 16'h0123, "DAC1 register keeps 14 bits");
    host_write(ADR_DAC2_VAL, 16'h2000);
    check(dac2d == 14'h2000, "DAC2 pins: -(-0x2000) wraps to -0x2000");
    host_write(ADR_DAC2_VAL, 16'h0001);
    check(dac2d == 14'h3FFF, "DAC2 pins: -1");
    // read-only registers ignore writes
    host_write(ADR_ADC1_VAL, 16'h1111);
    read_check(ADR_ADC1_VAL, 16'h0ABC, "ADC1 register not writable");

    // ---- control register fields
    host_write(ADR_CTRL, 16'h12F0);
    check(adc2sw == 4'h1 && adc1sw == 4'h2, "switch nibbles");
    check(adc2shdn && adc1shdn && dac2slp && dac1slp, "power-down bits");
    host_write(ADR_CTRL, 16'h8450);
    check(adc2sw == 4'h8 && adc1sw == 4'h4 && !adc2shdn && adc1shdn && !dac2slp && dac1slp, "mixed control fields");

    // ---- converter clocks
    clk_period(adc1clk, per); check(per == 2, $sformatf("ADC1 clock /2, got %0d", per));
    clk_period(adc2clk, per); check(per == 2, $sformatf("ADC2 clock /2, got %0d", per));
    check(dac1clk === clk && dac2clk === clk, "DAC clocks follow the main clock");
    host_write(ADR_ADC1_CLKDIV, 16'd5);
    clk_period(adc1clk, per); check(per == 5, $sformatf("ADC1 clock /5, got %0d", per));
    host_write(ADR_DAC2_CLKDIV, 16'd0);
    begin
      bit low;
      low = 1;
      repeat (10) begin @(negedge clk); if (dac2clk) low = 0; @(posedge clk); #1 if (dac2clk) low = 0; end
      check(low, "DAC2 clock stopped with constant 0");
    end
    clk_period(tp1, per); check(per == 10, $sformatf("blinker /10, got %0d", per));

    // ---- soft reset through the control register (bit 2)
    host_write(ADR_DAC1_VAL, 16'h0777);
    host_write(ADR_CTRL, 16'h4404);
    read_check(ADR_CTRL, 16'h4400, "soft reset clears itself");
    read_check(ADR_DAC1_VAL, 16'h0000, "soft reset restores DAC1");
    read_check(ADR_ADC1_CLKDIV, 16'h0002, "soft reset restores ADC1 divider");
    read_check(ADR_DAC2_CLKDIV, 16'h0001, "soft reset restores DAC2 divider");
    check(dac1d == 14'h0000, "DAC1 pins back to zero");

    check(ack == 1'b0, "acknowledge reserved, low");
    check(overlaps == 0, $sformatf("no bus drive overlap, %0d seen", overlaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
