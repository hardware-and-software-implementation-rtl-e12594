// fab_regfile: the converter board's host-visible register file.
//
// The host sees the board as ten 16-bit registers behind a 6-bit address bus
// with a strobe and a read/not-write line (1 = read, 0 = write):
//   0x00 CTRL (W, 0x4400)   0x01 STAT (R)          0x02/0x03 ADC1/ADC2 value (R)
//   0x04/0x05 DAC1/DAC2 value (W, 0x0000)
//   0x06/0x07 ADC1/ADC2 clock division constant (W, 0x0002)
//   0x08/0x09 DAC1/DAC2 clock division constant (W, 0x0001)
// Every register can be read back. A write to a read-only or unused address is
// ignored. The converter value registers are 14 bits wide: their two upper
// bits always read as zero and are discarded on write.
//
// Timing: on a rising clock edge with strobe_i high, a write (rnw_i = 0) loads
// data_from_bus into the addressed register, and a read (rnw_i = 1) loads the
// addressed register into data_to_bus, which holds that value until the next
// read. A strobe held high for k cycles repeats the access k times. The inputs
// are expected already synchronised to clk_i. rst_i (asynchronous, active
// high) restores the reset values.
//
// Registered read data and an unchanged read register between reads follow the
// board's CPLD code; reading zero at an unused address is this design's choice.
module fab_regfile
  import fab_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_i,
  input  logic    rnw_i,
  input  logic    strobe_i,
  input  adr_t    adr_i,
  input  word_t   data_from_bus,
  output word_t   data_to_bus,
  // register contents towards the board
  output ctrl_t   ctrl_o,
  output sample_t dac1_val_o,
  output sample_t dac2_val_o,
  output word_t   adc1_div_o,
  output word_t   adc2_div_o,
  output word_t   dac1_div_o,
  output word_t   dac2_div_o,
  // read-only sources from the board
  input  stat_t   stat_i,
  input  sample_t adc1_val_i,
  input  sample_t adc2_val_i
);

  // Write side.
  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      ctrl_o     <= ctrl_t'(CTRL_DEFAULT);
      dac1_val_o <= CONV_W'(DAC_VAL_DEFAULT);
      dac2_val_o <= CONV_W'(DAC_VAL_DEFAULT);
      adc1_div_o <= ADC_CLKDIV_DEFAULT;
      adc2_div_o <= ADC_CLKDIV_DEFAULT;
      dac1_div_o <= DAC_CLKDIV_DEFAULT;
      dac2_div_o <= DAC_CLKDIV_DEFAULT;
    end else if (strobe_i && !rnw_i) begin
      case (adr_i)
        ADR_CTRL:        ctrl_o     <= ctrl_t'(data_from_bus);
        ADR_DAC1_VAL:    dac1_val_o <= data_from_bus[CONV_W-1:0];
        ADR_DAC2_VAL:    dac2_val_o <= data_from_bus[CONV_W-1:0];
        ADR_ADC1_CLKDIV: adc1_div_o <= data_from_bus;
        ADR_ADC2_CLKDIV: adc2_div_o <= data_from_bus;
        ADR_DAC1_CLKDIV: dac1_div_o <= data_from_bus;
        ADR_DAC2_CLKDIV: dac2_div_o <= data_from_bus;
        default: ;  // read-only or unused address
      endcase
    end
  end

  // Read side.
  word_t rd_mux;

  always_comb begin
    case (adr_i)
      ADR_CTRL:        rd_mux = word_t'(ctrl_o);
      ADR_STAT:        rd_mux = word_t'(stat_i);
      ADR_ADC1_VAL:    rd_mux = DATA_W'(adc1_val_i);
      ADR_ADC2_VAL:    rd_mux = DATA_W'(adc2_val_i);
      ADR_DAC1_VAL:    rd_mux = DATA_W'(dac1_val_o);
      ADR_DAC2_VAL:    rd_mux = DATA_W'(dac2_val_o);
      ADR_ADC1_CLKDIV: rd_mux = adc1_div_o;
      ADR_ADC2_CLKDIV: rd_mux = adc2_div_o;
      ADR_DAC1_CLKDIV: rd_mux = dac1_div_o;
      ADR_DAC2_CLKDIV: rd_mux = dac2_div_o;
      default:         rd_mux = '0;
    endcase
  end

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i)                      data_to_bus <= '0;
    else if (strobe_i && rnw_i)     data_to_bus <= rd_mux;
  end

endmodule
