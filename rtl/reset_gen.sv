// reset_gen: power-on reset generator.
//
// A small counter starts at zero at power-up (register power-up value) and
// counts clock cycles. The active-high reset output is held high while the
// counter is below RESET_CLKS and drops for good once it reaches it, so every
// finite state machine of the design leaves reset in a known state after
// RESET_CLKS rising clock edges.
//
// Interface: clk_i, rst_o (active high, registered). Timing: rst_o is high for
// exactly RESET_CLKS cycles after power-up. The default of two cycles is the
// board's; relying on the register power-up value (supported by the CPLD and
// FPGA families used) is this design's reading of "a simple counter".
// The declaration initialisers on cnt and rst_q are therefore deliberate: they
// are the power-up contents of the two registers, which the clocked block then
// updates (linters flag this pattern; here it is the intended behaviour).
// rst_o is used as an asynchronous reset by some consumers (the host state
// machine) and as a synchronous input by others (the CPLD's registered global
// reset); both are fine because rst_o itself is a register output.
module reset_gen #(
  parameter int unsigned RESET_CLKS = 2
) (
  input  logic clk_i,
  output logic rst_o
);

  localparam int unsigned CW = $clog2(RESET_CLKS + 1) + 1;

  logic [CW-1:0] cnt   = '0;
  logic          rst_q = 1'b1;

  always_ff @(posedge clk_i) begin
    if (cnt != CW'(RESET_CLKS)) cnt <= cnt + 1'b1;
    rst_q <= (cnt + 1'b1) < CW'(RESET_CLKS);
  end

  assign rst_o = rst_q;

endmodule
