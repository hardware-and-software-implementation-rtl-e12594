// tb_fib_host_fsm: checks the host bus master's line sequence and timing.
//
// The read-data input carries a new value every cycle (a cycle counter), so
// the value the master writes back tells exactly on which edge it captured the
// bus. With the default 200 MHz / 25 ns setting the wait length is 3 ticks and
// the checks are:
//  * after reset: strobe low, read direction, own driver off;
//  * every strobe is one cycle wide; a read strobe has rnw = 1, the ADC1
//    address, transceiver towards the FPGA and own driver off; a write strobe
//    has rnw = 0, the DAC1 address, transceiver towards the board and own
//    driver on;
//  * the transceiver direction never changes while the own driver is on;
//  * the bus is captured on the 5th edge after the read strobe (the wait of
//    3 ticks lasts 4 cycles, then the READ state samples), i.e. the value
//    present after the 4th edge is written back;
//  * read strobe to write strobe 9 cycles, one transfer every 16 cycles;
//  * sawtooth mode: no reads, written values -0x2000, -0x1FFF, ... one every
//    9 cycles; switching back restores the digital short.
module tb_fib_host_fsm;
  import fab_pkg::*;

  logic  clk = 1'b0, rst, saw_mode;
  logic  rnw, strobe, dir, en, done;
  adr_t  adr;
  word_t to_bus, from_bus;
  int    checks = 0, failures = 0;
  int    cyc = 0;

  fib_host_fsm dut (
    .rst_i(rst), .clk_i(clk), .saw_mode(saw_mode), .rnw_o(rnw), .strobe_o(strobe), .ack_i(1'b0),
    .ext_driver_dir(dir), .adr_o(adr), .en_write_to_bus(en), .data_to_bus(to_bus),
    .data_from_bus(from_bus), .xfer_done(done));

  always #5 clk = ~clk;

  // read data = number of the edge that precedes it
  always @(posedge clk) begin
    cyc <= cyc + 1;
    from_bus <= word_t'(cyc + 1);
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @cyc %0d: %s", cyc, what); end
  endtask

  // protocol monitor, sampled after each edge
  int   last_read_strobe = -1, last_write_strobe = -1, last_done = -1;
  int   reads = 0, writes = 0, saw_writes = 0;
  logic prev_strobe = 0, prev_dir = 0, prev_en = 0;
  logic mon_on = 0;
  int   saw_expect;
  bit   in_saw_check = 0;
  int   read_periods_ok = 0, write_periods_ok = 0;

  always @(posedge clk) begin
    #1;
    if (mon_on) begin
      if (prev_strobe && strobe) check(0, "strobe wider than one cycle");
      if (dir != prev_dir && (en || prev_en)) check(0, "direction changed while own driver on");
      if (strobe && !prev_strobe) begin
        if (rnw) begin
          check(adr == ADR_ADC1_VAL && !dir && !en, "read strobe line state");
          last_read_strobe = cyc;
          reads++;
        end else begin
          check(adr == ADR_DAC1_VAL && dir && en, "write strobe line state");
          if (!saw_mode && last_read_strobe >= 0) begin
            check(cyc - last_read_strobe == 9, $sformatf("read to write strobe %0d cycles", cyc - last_read_strobe));
            // the written value is the bus value present after edge (read strobe + 4)
            check(int'(to_bus) == last_read_strobe + 4,
                  $sformatf("captured edge: value %0d, read strobe at %0d", to_bus, last_read_strobe));
          end
          if (in_saw_check) begin
            check(to_bus == word_t'(saw_expect[13:0]), $sformatf("saw value %h expected %h", to_bus, saw_expect[13:0]));
            saw_expect = saw_expect + 1;
            saw_writes++;
          end
          writes++;
        end
      end
      if (done) begin
        if (last_done >= 0) begin
          if (!saw_mode && !in_saw_check && reads > 1) begin
            check(cyc - last_done == 16, $sformatf("transfer period %0d, expected 16", cyc - last_done));
            read_periods_ok++;
          end
          if (in_saw_check && saw_writes > 1) begin
            check(cyc - last_done == 9, $sformatf("sawtooth period %0d, expected 9", cyc - last_done));
            write_periods_ok++;
          end
        end
        last_done = cyc;
      end
    end
    prev_strobe = strobe; prev_dir = dir; prev_en = en;
  end

  initial begin
    int reads_before;
    rst = 1; saw_mode = 0; from_bus = '0;
    repeat (3) @(posedge clk);
    #1 check(!strobe && rnw && !dir && !en, "reset line state");
    rst = 0;
    mon_on = 1;
    repeat (200) @(posedge clk);
    check(reads >= 10 && writes >= 10, $sformatf("digital short transfers: %0d reads %0d writes", reads, writes));
    // sawtooth mode
    @(posedge clk);
    wait (dut.state == dut.S_WAIT && !rnw);      // inside a write's wait state
    @(negedge clk) saw_mode = 1;
    last_done = -1;
    saw_expect = 14'h2000;
    in_saw_check = 1;
    reads_before = reads;
    repeat (200) @(posedge clk);
    check(reads == reads_before, "no reads in sawtooth mode");
    check(saw_writes >= 15, $sformatf("sawtooth writes %0d", saw_writes));
    in_saw_check = 0;
    @(negedge clk) saw_mode = 0;
    last_done = -1;
    reads_before = reads;
    repeat (100) @(posedge clk);
    check(reads > reads_before, "digital short resumes");
    check(read_periods_ok > 5 && write_periods_ok > 5, "periods measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
