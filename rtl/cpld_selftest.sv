// cpld_selftest: stand-alone CPLD test routines for the converter board,
// used before the host link is in place.
//
// Two routines, chosen by saw_mode:
//  * digital short (saw_mode = 0): each ADC sample is registered on the main
//    clock and sent unchanged to the DAC of the same channel, so a signal at
//    an ADC input comes back at the DAC output. The ADCs are clocked at half
//    the main clock (clock divider constant 2) and the DACs at the main clock
//    (constant 1): 100 MHz and 200 MHz with the board's 200 MHz clock.
//  * sawtooth (saw_mode = 1): both DACs receive a 14-bit two's-complement ramp
//    that counts up by one per main-clock cycle from -0x2000 to +0x1FFF and
//    wraps, a period of 16384 cycles (81.92 us at 200 MHz).
//
// Reset comes from a power-on reset generator. The converter power-down lines
// are held inactive and the analogue switches at the signal connection.
// Latency of the digital short: one main-clock cycle from ADC pins to DAC pins.
// The two routines and their clock rates follow the board's test programs;
// selecting them with a pin instead of loading two programs is this design's
// packaging.
module cpld_selftest
  import fab_pkg::*;
#(
  parameter int unsigned RESET_CLKS = 2
) (
  input  logic       clk_i,
  input  logic       saw_mode,
  input  sample_t    adc1d,
  input  sample_t    adc2d,
  output sample_t    dac1d,
  output sample_t    dac2d,
  output logic       adc1clk,
  output logic       adc2clk,
  output logic       dac1clk,
  output logic       dac2clk,
  output logic [3:0] adc1sw,
  output logic [3:0] adc2sw,
  output logic       adc1shdn,
  output logic       adc2shdn,
  output logic       dac1slp,
  output logic       dac2slp
);

  logic    rst;
  sample_t saw;

  reset_gen #(.RESET_CLKS(RESET_CLKS)) u_por (.clk_i (clk_i), .rst_o (rst));

  sawtooth_gen #(.WIDTH(CONV_W)) u_saw (
    .clk_i (clk_i), .rst_i (rst), .en (1'b1), .dat_o (saw));

  always_ff @(posedge clk_i or posedge rst) begin
    if (rst) begin
      dac1d <= '0;
      dac2d <= '0;
    end else if (saw_mode) begin
      dac1d <= saw;
      dac2d <= saw;
    end else begin
      dac1d <= adc1d;
      dac2d <= adc2d;
    end
  end

  clk_divider #(.WIDTH(2)) u_adc1_clk (
    .clk_i (clk_i), .rst_i (rst), .div_i (2'd2), .clk_o (adc1clk));
  clk_divider #(.WIDTH(2)) u_adc2_clk (
    .clk_i (clk_i), .rst_i (rst), .div_i (2'd2), .clk_o (adc2clk));
  clk_divider #(.WIDTH(2)) u_dac1_clk (
    .clk_i (clk_i), .rst_i (rst), .div_i (2'd1), .clk_o (dac1clk));
  clk_divider #(.WIDTH(2)) u_dac2_clk (
    .clk_i (clk_i), .rst_i (rst), .div_i (2'd1), .clk_o (dac2clk));

  assign adc1sw   = SW_SIGNAL;
  assign adc2sw   = SW_SIGNAL;
  assign adc1shdn = 1'b0;
  assign adc2shdn = 1'b0;
  assign dac1slp  = 1'b0;
  assign dac2slp  = 1'b0;

endmodule
