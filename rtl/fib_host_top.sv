// fib_host_top: host FPGA logic used to test the converter board link.
//
// Holds a power-on reset generator, the bus-master state machine
// (fib_host_fsm: digital short or sawtooth), the FPGA's tri-state bus driver
// and a slow LED blinker. Its bus goes to the external 16-bit transceiver on
// the host board, whose direction it controls with ext_dir; address, strobe,
// read/not-write and the clock go to the converter board directly.
//
// clk_i is the system clock of the FPGA. On the host board it is 200 MHz,
// produced by the FPGA's internal PLL from a 50 MHz crystal; the PLL is a
// vendor macro and is not part of this module, so clk_i is expected at the
// PLL output frequency. The same clock is forwarded to the converter board
// (board_clk), which runs its CPLD from it.
//
// The LED blinker divides the clock by 0xEEEEFF with a 24-bit divider, as
// in the host test code; the rest follows fib_host_fsm.
module fib_host_top
  import fab_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 200_000_000,
  parameter int unsigned DELAY_NS    = 25,
  parameter int unsigned RESET_CLKS  = 2,
  parameter logic [23:0]  LED_DIV     = 24'hEEEEFF
) (
  input  logic       clk_i,
  input  logic       saw_mode,     // 0 = digital short, 1 = sawtooth
  // link to the converter board
  inout  wire [15:0] bus_io,       // data, through the external transceiver
  output logic       ext_dir,      // transceiver direction, 1 = towards board
  output adr_t       adr_o,
  output logic       strobe_o,
  output logic       rnw_o,
  input  logic       ack_i,
  output logic       board_clk,
  // status
  output logic       led_o,
  output logic       xfer_done
);

  logic  rst;
  logic  en_write;
  word_t to_bus, from_bus;

  reset_gen #(.RESET_CLKS(RESET_CLKS)) u_por (
    .clk_i (clk_i),
    .rst_o (rst)
  );

  fib_host_fsm #(
    .CLK_FREQ_HZ (CLK_FREQ_HZ),
    .DELAY_NS    (DELAY_NS)
  ) u_fsm (
    .rst_i           (rst),
    .clk_i           (clk_i),
    .saw_mode        (saw_mode),
    .rnw_o           (rnw_o),
    .strobe_o        (strobe_o),
    .ack_i           (ack_i),
    .ext_driver_dir  (ext_dir),
    .adr_o           (adr_o),
    .en_write_to_bus (en_write),
    .data_to_bus     (to_bus),
    .data_from_bus   (from_bus),
    .xfer_done       (xfer_done)
  );

  bus_driver #(.WIDTH(DATA_W)) u_bus (
    .en_write_to_bus (en_write),
    .data_bus        (bus_io),
    .data_to_bus     (to_bus),
    .data_from_bus   (from_bus)
  );

  clk_divider #(.WIDTH(24)) u_blinker (
    .clk_i (clk_i),
    .rst_i (rst),
    .div_i (LED_DIV),
    .clk_o (led_o)
  );

  assign board_clk = clk_i;

endmodule
