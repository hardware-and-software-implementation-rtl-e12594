// tb_fib_host_top: checks the host FPGA test top on its own.
//
// The testbench plays the transceiver and the board: while the direction line
// points to the FPGA it drives the bus with a sample that changes after every
// write; while it points to the board it only listens. Checks:
//  * during the power-on reset the link is in the read direction;
//  * each write strobe carries the DAC 1 address and the sample that was on
//    the bus, each read strobe the ADC 1 address;
//  * the testbench never has to drive while the FPGA drives;
//  * the clock is forwarded to the board unchanged;
//  * the LED blinker (divider 0xEEEEFF) first falls 0xEEEEFF / 2 = 7829375
//    cycles after reset.
module tb_fib_host_top;
  import fab_pkg::*;

  logic        clk = 1'b0, saw_mode;
  wire  [15:0] bus;
  logic        dir, strobe, rnw, board_clk, led, done;
  adr_t        adr;
  word_t       sample;
  int          checks = 0, failures = 0, reads = 0, writes = 0, overlap = 0;

  fib_host_top dut (
    .clk_i(clk), .saw_mode(saw_mode), .bus_io(bus), .ext_dir(dir), .adr_o(adr),
    .strobe_o(strobe), .rnw_o(rnw), .ack_i(1'b0), .board_clk(board_clk), .led_o(led), .xfer_done(done));

  assign bus = dir ? 16'hzzzz : sample;

  always #2.5 clk = ~clk;

  initial begin : watchdog
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic prev_strobe = 0;
  always @(posedge clk) begin
    #0.5;
    if (dut.en_write && !dir) overlap++;
    if (strobe && !prev_strobe) begin
      if (rnw) begin
        reads++;
        check(adr == ADR_ADC1_VAL, "read address ADC1");
      end else begin
        writes++;
        check(adr == ADR_DAC1_VAL, "write address DAC1");
        check(bus == sample, $sformatf("write data %h expected %h", bus, sample));
        sample = word_t'($urandom);
      end
    end
    prev_strobe = strobe;
  end

  initial begin
    int edges;
    saw_mode = 0; sample = 16'h1234;
    // reset lasts two cycles; count edges until the LED first falls
    edges = 0;
    @(posedge clk); #0.5;
    check(!dir && !strobe && rnw, "link in read direction during reset");
    @(posedge clk);                   // reset released after the 2nd edge
    #0.5;
    check(board_clk === clk, "board clock forwarded");
    while (!(led === 1'b0 && edges > 10)) begin
      @(posedge clk); #0.5;
      edges++;
      if (edges == 1000) check(board_clk === clk, "board clock forwarded");
    end
    check(edges == 7829375, $sformatf("LED first falls after %0d cycles, expected 7829375", edges));
    check(reads > 1000 && writes > 1000, $sformatf("transfers: %0d reads %0d writes", reads, writes));
    check(overlap == 0, "no drive overlap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
