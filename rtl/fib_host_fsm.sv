// fib_host_fsm: host-side (FPGA) bus master that exercises the converter board
// link: "digital short" and "sawtooth" test routines.
//
// In digital-short mode (saw_mode = 0) the state machine reads the ADC 1
// sample register of the board and writes the value back to the DAC 1
// register, forever, so a signal at ADC 1 reappears at DAC 1. In sawtooth mode
// (saw_mode = 1, sampled at the start of each transfer) it skips the read and
// writes a 14-bit two's-complement ramp to DAC 1, one step per transfer.
//
// Three tri-state drivers share the data path: this FPGA's own bus driver
// (en_write_to_bus), the external transceiver on the host board (ext_dir:
// 0 = board to FPGA, 1 = FPGA to board) and the board's CPLD driver (on while
// rnw_o = 1). The states turn them one at a time so that two outputs never
// face each other:
//   RESET       strobe low, read direction, everything listening
//   READ_PRE1   own driver off, read address          READ_PRE2  ext_dir = 0
//   READ_PRE3   strobe high, rnw high                  WAIT       strobe low
//   READ        capture the bus into the local word
//   WRITE_PRE1  strobe low, rnw low, write address     WRITE_PRE2 ext_dir = 1
//   WRITE_PRE3  own driver on                          WRITE      strobe high
//   WAIT        strobe low, then back to READ_PRE1
// WAIT holds for WAIT_TICKS + 1 cycles; the calling state stores the state to
// return to. WAIT_TICKS = max(1, CLK_FREQ_HZ * DELAY_NS / 1e9 - 2); with the
// defaults (200 MHz, 25 ns) it is 3, so one complete read-and-write transfer
// takes 10 + 2 * WAIT_TICKS = 16 cycles. With a board that acts on the strobe
// two cycles after it arrives and presents read data one cycle later (see
// fab_cpld_top) the read is captured two cycles after the data is valid.
//
// The state sequence, the single shared WAIT state with a return state, the
// wait-length formula and its 25 ns default follow the host test code. Reading
// the ADC 1 register (0x02) and writing DAC 1 (0x04) is this design's reading
// of "reads data and writes it back"; the sawtooth mode input is this design's
// way of carrying the host-side sawtooth routine in the same state machine.
module fib_host_fsm
  import fab_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 200_000_000,
  parameter int unsigned DELAY_NS    = 25,
  parameter adr_t        ADC_ADR     = ADR_ADC1_VAL,
  parameter adr_t        DAC_ADR     = ADR_DAC1_VAL
) (
  input  logic  rst_i,
  input  logic  clk_i,
  input  logic  saw_mode,         // 0 = digital short, 1 = sawtooth
  output logic  rnw_o,
  output logic  strobe_o,
  input  logic  ack_i,            // reserved by the protocol, unused
  output logic  ext_driver_dir,   // 0 = board to FPGA, 1 = FPGA to board
  output adr_t  adr_o,
  output logic  en_write_to_bus,
  output word_t data_to_bus,
  input  word_t data_from_bus,
  output logic  xfer_done         // one-cycle pulse per completed write
);

  localparam longint unsigned TICKS_RAW =
      (longint'(CLK_FREQ_HZ) * longint'(DELAY_NS)) / 64'd1_000_000_000;
  localparam int unsigned WAIT_TICKS =
      (TICKS_RAW > 64'd2) ? int'(TICKS_RAW - 64'd2) : 1;
  localparam int unsigned DW = $clog2(WAIT_TICKS + 1);

  typedef enum logic [3:0] {
    S_RESET, S_READ_PRE1, S_READ_PRE2, S_READ_PRE3, S_READ,
    S_WRITE_PRE1, S_WRITE_PRE2, S_WRITE_PRE3, S_WRITE, S_WAIT
  } state_e;

  state_e         state, return_to;
  logic [DW-1:0]  delay_cnt;
  word_t          local_data;
  logic           saw_step;
  logic           saw_xfer;        // saw_mode as sampled for this transfer
  sample_t        saw_val;

  sawtooth_gen #(.WIDTH(CONV_W)) u_saw (
    .clk_i (clk_i),
    .rst_i (rst_i),
    .en    (saw_step),
    .dat_o (saw_val)
  );

  assign saw_step = (state == S_WRITE) && saw_xfer;

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      state           <= S_RESET;
      return_to       <= S_READ_PRE1;
      strobe_o        <= 1'b0;
      rnw_o           <= 1'b1;
      adr_o           <= '0;
      en_write_to_bus <= 1'b0;
      ext_driver_dir  <= 1'b0;
      delay_cnt       <= DW'(WAIT_TICKS);
      local_data      <= '0;
      data_to_bus     <= '0;
      xfer_done       <= 1'b0;
      saw_xfer        <= 1'b0;
    end else begin
      xfer_done <= 1'b0;
      unique case (state)
        S_RESET: begin
          strobe_o        <= 1'b0;
          rnw_o           <= 1'b1;
          adr_o           <= '0;
          en_write_to_bus <= 1'b0;
          ext_driver_dir  <= 1'b0;
          state           <= S_READ_PRE1;
        end
        S_READ_PRE1: begin
          strobe_o        <= 1'b0;
          en_write_to_bus <= 1'b0;
          saw_xfer        <= saw_mode;
          if (saw_mode) begin
            // nothing to read: go straight to the write with the next ramp value
            local_data <= DATA_W'(saw_val);
            state      <= S_WRITE_PRE1;
          end else begin
            adr_o <= ADC_ADR;
            state <= S_READ_PRE2;
          end
        end
        S_READ_PRE2: begin
          ext_driver_dir <= 1'b0;
          state          <= S_READ_PRE3;
        end
        S_READ_PRE3: begin
          strobe_o  <= 1'b1;
          rnw_o     <= 1'b1;
          return_to <= S_READ;
          state     <= S_WAIT;
        end
        S_READ: begin
          local_data <= data_from_bus;
          state      <= S_WRITE_PRE1;
        end
        S_WRITE_PRE1: begin
          strobe_o <= 1'b0;
          rnw_o    <= 1'b0;
          adr_o    <= DAC_ADR;
          state    <= S_WRITE_PRE2;
        end
        S_WRITE_PRE2: begin
          ext_driver_dir <= 1'b1;
          state          <= S_WRITE_PRE3;
        end
        S_WRITE_PRE3: begin
          en_write_to_bus <= 1'b1;
          state           <= S_WRITE;
        end
        S_WRITE: begin
          strobe_o    <= 1'b1;
          data_to_bus <= local_data;
          xfer_done   <= 1'b1;
          return_to   <= S_READ_PRE1;
          state       <= S_WAIT;
        end
        S_WAIT: begin
          strobe_o <= 1'b0;
          if (delay_cnt == '0) begin
            delay_cnt <= DW'(WAIT_TICKS);
            state     <= return_to;
          end else begin
            delay_cnt <= delay_cnt - 1'b1;
          end
        end
        default: state <= S_RESET;
      endcase
    end
  end

  // The FPGA may only drive its side once the transceiver points away from it.
  a_no_contention: assert property (@(posedge clk_i) disable iff (rst_i)
    en_write_to_bus |-> ext_driver_dir);

  // ack_i is reserved for later protocol extensions.
  logic unused_ack;
  assign unused_ack = ack_i;

endmodule
