// fab_cpld_top: logic of the converter board's CPLD.
//
// The CPLD sits between the host FPGA and the board's two ADC/DAC channels.
// Towards the host it is a register slave on a 16-bit bidirectional data bus,
// a 6-bit address bus, a strobe, a read/not-write line and an acknowledge line
// (reserved, always low). Towards the board it presents the register contents:
// the DAC samples, the four converter sampling clocks (produced by clock
// dividers from the host clock), the two analogue input-switch nibbles and the
// four converter power-down lines; it returns the ADC samples and out-of-range
// flags through read-only registers.
//
// Operation:
//  * Address, strobe and read/not-write come from the other board and pass a
//    two-flip-flop synchroniser before they reach the register file; the data
//    bus is sampled directly, as the host holds it stable over the access.
//  * The CPLD drives the data bus whenever the synchronised read/not-write line
//    says "read", so at rest (host reading) it always presents the last read
//    value. It releases the bus as soon as the read/not-write pin itself says
//    "write" (a pin-to-enable path that bypasses the synchroniser), a full
//    clock period before the host turns the external bus transceiver towards
//    the CPLD. Waiting for the synchroniser would keep it driving for one
//    cycle after the transceiver has turned. Turning the driver on still
//    waits for the synchronised line, which changes two cycles after the host
//    has turned the transceiver towards itself.
//  * Global reset = power-on reset OR the control register's soft-reset bit,
//    registered once. The soft reset restores every register, including the
//    reset bit itself, so it clears itself after two cycles.
//  * DAC samples are sent as the two's complement negation of the register
//    value when NEGATE_DAC is set (the board's CPLD code does so).
//
// Timing (host clock = CPLD clock): a strobe pulse is acted on two cycles
// after it arrives; read data is on the bus one cycle after that, i.e. three
// rising edges after the edge that raised the strobe.
//
// Register map, reset values, 2-FF synchronisation, clock dividers, the power-
// on reset and the test-pin blinker (divider constant 10) follow the board's
// design. The bus release straight from the pin and the registered soft
// reset are this design's choices. The calibration bits CAL1/CAL2 and the unused bit 3 of
// the control register are stored and read back but drive nothing here, as
// the calibration unit is not part of this logic.
module fab_cpld_top
  import fab_pkg::*;
#(
  parameter int unsigned CLKDIV_WIDTH = 16,   // width of the clock dividers
  parameter int unsigned RESET_CLKS   = 2,    // power-on reset length in cycles
  parameter bit          NEGATE_DAC   = 1'b1  // send -value to the DACs
) (
  input  logic          fibclk,      // main clock from the host board
  // host bus
  inout  wire  [15:0]   fibd,        // data bus
  input  adr_t          fiba,        // address bus
  input  logic          fibrnw,      // 1 = read, 0 = write
  input  logic          fibstrobe,   // access strobe
  output logic          fiback,      // acknowledge (reserved, low)
  // converters
  input  sample_t       adc1d,
  input  sample_t       adc2d,
  output sample_t       dac1d,
  output sample_t       dac2d,
  input  logic          adc1of,      // ADC out-of-range flags
  input  logic          adc2of,
  output logic          adc1clk,
  output logic          adc2clk,
  output logic          dac1clk,
  output logic          dac2clk,
  output logic          adc1shdn,    // ADC NAP mode
  output logic          adc2shdn,
  output logic          dac1slp,     // DAC SLEEP mode
  output logic          dac2slp,
  // analogue input switches (one-hot code, see fab_pkg::sw_code_e)
  output logic [3:0]    adc1sw,
  output logic [3:0]    adc2sw,
  // test pin: slow blinker showing that the CPLD is clocked
  output logic          tp1
);

  // ---------------------------------------------------------------- reset
  logic por_rst, global_rst;
  ctrl_t ctrl;

  reset_gen #(.RESET_CLKS(RESET_CLKS)) u_por (
    .clk_i (fibclk),
    .rst_o (por_rst)
  );

  always_ff @(posedge fibclk) global_rst <= por_rst | ctrl.rst;

  // ------------------------------------------------- host bus synchroniser
  logic [ADR_W+1:0] bus_ctl_raw, bus_ctl_q;
  adr_t adr_s;
  logic rnw_s, strobe_s;

  assign bus_ctl_raw = {fiba, fibrnw, fibstrobe};

  sync_2ff #(.WIDTH(ADR_W + 2)) u_sync (
    .clk (fibclk),
    .d   (bus_ctl_raw),
    .q   (bus_ctl_q)
  );

  assign {adr_s, rnw_s, strobe_s} = bus_ctl_q;

  // ------------------------------------------------------- register file
  word_t   rd_data, wr_data;
  sample_t dac1_val, dac2_val;
  word_t   adc1_div, adc2_div, dac1_div, dac2_div;
  stat_t   stat;

  always_comb begin
    stat      = '0;
    stat.otr1 = adc1of;
    stat.otr2 = adc2of;
  end

  fab_regfile u_regs (
    .clk_i         (fibclk),
    .rst_i         (global_rst),
    .rnw_i         (rnw_s),
    .strobe_i      (strobe_s),
    .adr_i         (adr_s),
    .data_from_bus (wr_data),
    .data_to_bus   (rd_data),
    .ctrl_o        (ctrl),
    .dac1_val_o    (dac1_val),
    .dac2_val_o    (dac2_val),
    .adc1_div_o    (adc1_div),
    .adc2_div_o    (adc2_div),
    .dac1_div_o    (dac1_div),
    .dac2_div_o    (dac2_div),
    .stat_i        (stat),
    .adc1_val_i    (adc1d),
    .adc2_val_i    (adc2d)
  );

  // ------------------------------------------------------------ bus driver
  // On only when the synchronised line says "read"; off as soon as the pin
  // itself says "write", without waiting for the synchroniser.
  logic drive_bus;
  assign drive_bus = rnw_s & fibrnw;

  bus_driver #(.WIDTH(DATA_W)) u_bus (
    .en_write_to_bus (drive_bus),
    .data_bus        (fibd),
    .data_to_bus     (rd_data),
    .data_from_bus   (wr_data)
  );

  assign fiback = 1'b0;

  // ------------------------------------------------------ converter clocks
  clk_divider #(.WIDTH(CLKDIV_WIDTH)) u_adc1_clk (
    .clk_i (fibclk), .rst_i (global_rst),
    .div_i (CLKDIV_WIDTH'(adc1_div)), .clk_o (adc1clk));
  clk_divider #(.WIDTH(CLKDIV_WIDTH)) u_adc2_clk (
    .clk_i (fibclk), .rst_i (global_rst),
    .div_i (CLKDIV_WIDTH'(adc2_div)), .clk_o (adc2clk));
  clk_divider #(.WIDTH(CLKDIV_WIDTH)) u_dac1_clk (
    .clk_i (fibclk), .rst_i (global_rst),
    .div_i (CLKDIV_WIDTH'(dac1_div)), .clk_o (dac1clk));
  clk_divider #(.WIDTH(CLKDIV_WIDTH)) u_dac2_clk (
    .clk_i (fibclk), .rst_i (global_rst),
    .div_i (CLKDIV_WIDTH'(dac2_div)), .clk_o (dac2clk));

  clk_divider #(.WIDTH(4)) u_blinker (
    .clk_i (fibclk), .rst_i (global_rst),
    .div_i (4'd10), .clk_o (tp1));

  // ----------------------------------------------------- board-side outputs
  assign adc2sw   = ctrl.sw2;
  assign adc1sw   = ctrl.sw1;
  assign adc2shdn = ctrl.adc2_shdn;
  assign adc1shdn = ctrl.adc1_shdn;
  assign dac2slp  = ctrl.dac2_slp;
  assign dac1slp  = ctrl.dac1_slp;

  assign dac1d = NEGATE_DAC ? (~dac1_val + 1'b1) : dac1_val;
  assign dac2d = NEGATE_DAC ? (~dac2_val + 1'b1) : dac2_val;

endmodule
