// fab_pkg: register map, reset values and bit fields shared by the converter
// board's CPLD logic and by the host-side (FPGA) test logic.
//
// The board exposes ten 16-bit registers behind a 6-bit address bus. The
// addresses, access rights and reset values below are those of the board's
// register table; the control-register bit fields follow its control/status
// register layout. The global soft-reset bit is taken as bit 2 of the control
// register (the bit drawing and the register description agree on bit 2).
package fab_pkg;

  localparam int unsigned DATA_W = 16;  // host data bus and register width
  localparam int unsigned ADR_W  = 6;   // host address bus width
  localparam int unsigned CONV_W = 14;  // ADC / DAC sample width

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADR_W-1:0]  adr_t;
  typedef logic [CONV_W-1:0] sample_t;

  // Register addresses.
  typedef enum logic [ADR_W-1:0] {
    ADR_CTRL        = 6'h00,  // W  control register
    ADR_STAT        = 6'h01,  // R  status register
    ADR_ADC1_VAL    = 6'h02,  // R  ADC channel 1 sample
    ADR_ADC2_VAL    = 6'h03,  // R  ADC channel 2 sample
    ADR_DAC1_VAL    = 6'h04,  // W  DAC channel 1 sample
    ADR_DAC2_VAL    = 6'h05,  // W  DAC channel 2 sample
    ADR_ADC1_CLKDIV = 6'h06,  // W  ADC channel 1 clock division constant
    ADR_ADC2_CLKDIV = 6'h07,  // W  ADC channel 2 clock division constant
    ADR_DAC1_CLKDIV = 6'h08,  // W  DAC channel 1 clock division constant
    ADR_DAC2_CLKDIV = 6'h09   // W  DAC channel 2 clock division constant
  } reg_adr_e;

  // Reset values of the writable registers.
  localparam word_t CTRL_DEFAULT       = 16'h4400;
  localparam word_t DAC_VAL_DEFAULT    = 16'h0000;
  localparam word_t ADC_CLKDIV_DEFAULT = 16'h0002;
  localparam word_t DAC_CLKDIV_DEFAULT = 16'h0001;

  // Analogue input switch codes (one nibble per channel in CTRL).
  typedef enum logic [3:0] {
    SW_REF     = 4'h1,  // ADC input to the 2.5 V reference
    SW_GND     = 4'h2,  // ADC input to ground
    SW_SIGNAL  = 4'h4,  // normal signal connection
    SW_XDAC    = 4'h8   // ADC input to the opposite channel's DAC output
  } sw_code_e;

  // Control register layout, bit 15 first.
  typedef struct packed {
    logic [3:0] sw2;        // 15:12 analogue switch of channel 2
    logic [3:0] sw1;        // 11:8  analogue switch of channel 1
    logic       adc2_shdn;  // 7     ADC 2 NAP mode
    logic       adc1_shdn;  // 6     ADC 1 NAP mode
    logic       dac2_slp;   // 5     DAC 2 SLEEP mode
    logic       dac1_slp;   // 4     DAC 1 SLEEP mode
    logic       unused3;    // 3     not assigned
    logic       rst;        // 2     global soft reset
    logic       cal2;       // 1     calibration request, channel 2 (reserved)
    logic       cal1;       // 0     calibration request, channel 1 (reserved)
  } ctrl_t;

  // Status register layout, bit 15 first.
  typedef struct packed {
    logic [11:0] unused15_4;  // 15:4 not assigned, read as zero
    logic        otr2;        // 3    ADC 2 out of range
    logic        otr1;        // 2    ADC 1 out of range
    logic        unused1;     // 1    not assigned
    logic        cal3;        // 0    reserved for calibration, read as zero
  } stat_t;

endpackage
