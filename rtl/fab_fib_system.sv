// fab_fib_system: the complete digital side of the converter board together
// with the host FPGA logic that tests it.
//
// Data path of the main system: the host FPGA (fib_host_top) is bus master.
// Its 16-bit data bus passes the external transceiver (bus_transceiver) on the
// host board and reaches the converter board's CPLD (fab_cpld_top), which
// holds the register file and drives the two ADC/DAC channels. Address,
// strobe, read/not-write and the clock go from the FPGA to the CPLD directly;
// the acknowledge line comes back. In digital-short mode the host reads the
// ADC 1 register and writes the value to the DAC 1 register, so the DAC 1 pins
// follow the ADC 1 pins (negated, see fab_cpld_top) once per 16-cycle
// transfer; in sawtooth mode it writes a ramp to DAC 1 instead.
//
// Beside it, with its own ports (prefix st_), stands cpld_selftest: the
// CPLD's stand-alone test program (on-board digital short and sawtooth), which
// on the board replaces the main CPLD program and so is not connected to it.
//
// clk_200 is the FPGA system clock as delivered by the FPGA's PLL (200 MHz on
// the board); the PLL itself is a vendor macro outside this design. The
// converter chips, analogue switches and amplifiers are outside it too: their
// digital pins are this module's ports.
//
// A concurrent assertion checks that the CPLD never drives its side of the
// link while the transceiver drives it too. The two bus segments are joined
// by the transceiver model's pair of tri-state drivers, which a simulator may
// report as a circular combinational path; only one direction is ever enabled,
// so no real loop exists (see bus_transceiver). XCVR_DELAY sets the
// transceiver model's propagation delay for simulation; it has no effect on
// the synthesizable parts.
module fab_fib_system
  import fab_pkg::*;
#(
  parameter realtime XCVR_DELAY = 0ns  // transceiver model delay, 0 = ideal
) (
  input  logic       clk_200,
  input  logic       saw_mode,      // host routine: 0 digital short, 1 sawtooth
  // converter channel pins of the board
  input  sample_t    adc1d,
  input  sample_t    adc2d,
  input  logic       adc1of,
  input  logic       adc2of,
  output sample_t    dac1d,
  output sample_t    dac2d,
  output logic       adc1clk,
  output logic       adc2clk,
  output logic       dac1clk,
  output logic       dac2clk,
  output logic       adc1shdn,
  output logic       adc2shdn,
  output logic       dac1slp,
  output logic       dac2slp,
  output logic [3:0] adc1sw,
  output logic [3:0] adc2sw,
  output logic       tp1,
  // host status
  output logic       led,
  output logic       xfer_done,
  // stand-alone CPLD test program
  input  logic       st_saw_mode,
  input  sample_t    st_adc1d,
  input  sample_t    st_adc2d,
  output sample_t    st_dac1d,
  output sample_t    st_dac2d,
  output logic       st_adc1clk,
  output logic       st_adc2clk,
  output logic       st_dac1clk,
  output logic       st_dac2clk,
  output logic [3:0] st_adc1sw,
  output logic [3:0] st_adc2sw,
  output logic       st_adc1shdn,
  output logic       st_adc2shdn,
  output logic       st_dac1slp,
  output logic       st_dac2slp
);

  wire  [15:0] bus_fpga;   // FPGA side of the transceiver
  wire  [15:0] bus_board;  // converter-board side of the transceiver
  logic        ext_dir, strobe, rnw, ack, board_clk;
  adr_t        adr;

  fib_host_top u_host (
    .clk_i     (clk_200),
    .saw_mode  (saw_mode),
    .bus_io    (bus_fpga),
    .ext_dir   (ext_dir),
    .adr_o     (adr),
    .strobe_o  (strobe),
    .rnw_o     (rnw),
    .ack_i     (ack),
    .board_clk (board_clk),
    .led_o     (led),
    .xfer_done (xfer_done)
  );

  bus_transceiver #(.WIDTH(16), .PROP_DELAY(XCVR_DELAY)) u_xcvr (
    .a     (bus_fpga),
    .b     (bus_board),
    .dir_i (ext_dir)
  );

  fab_cpld_top u_cpld (
    .fibclk    (board_clk),
    .fibd      (bus_board),
    .fiba      (adr),
    .fibrnw    (rnw),
    .fibstrobe (strobe),
    .fiback    (ack),
    .adc1d     (adc1d),
    .adc2d     (adc2d),
    .dac1d     (dac1d),
    .dac2d     (dac2d),
    .adc1of    (adc1of),
    .adc2of    (adc2of),
    .adc1clk   (adc1clk),
    .adc2clk   (adc2clk),
    .dac1clk   (dac1clk),
    .dac2clk   (dac2clk),
    .adc1shdn  (adc1shdn),
    .adc2shdn  (adc2shdn),
    .dac1slp   (dac1slp),
    .dac2slp   (dac2slp),
    .adc1sw    (adc1sw),
    .adc2sw    (adc2sw),
    .tp1       (tp1)
  );

  cpld_selftest u_selftest (
    .clk_i    (clk_200),
    .saw_mode (st_saw_mode),
    .adc1d    (st_adc1d),
    .adc2d    (st_adc2d),
    .dac1d    (st_dac1d),
    .dac2d    (st_dac2d),
    .adc1clk  (st_adc1clk),
    .adc2clk  (st_adc2clk),
    .dac1clk  (st_dac1clk),
    .dac2clk  (st_dac2clk),
    .adc1sw   (st_adc1sw),
    .adc2sw   (st_adc2sw),
    .adc1shdn (st_adc1shdn),
    .adc2shdn (st_adc2shdn),
    .dac1slp  (st_dac1slp),
    .dac2slp  (st_dac2slp)
  );

  // The CPLD drives the board side only while the transceiver points to the
  // FPGA. Sampled in the middle of each cycle, when the drivers have settled
  // after the rising edge; before the first rising edge the registers still
  // hold their power-up values and the host has not applied its reset.
  a_board_side_free: assert property (@(negedge clk_200)
    u_cpld.drive_bus |-> !ext_dir);

endmodule
