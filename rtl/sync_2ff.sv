// sync_2ff: two-flip-flop synchroniser for signals that arrive from the other
// board, whose clock is a delayed copy of the local one.
//
// Every bit of d is sampled into a first register stage (meta) and then into a
// second one (q) on the rising edge of clk. If the first stage is caught in a
// set-up or hold violation, the second gives it a clock period to settle
// before the value enters the logic.
//
// Interface: clk, d (asynchronous to clk, or skewed), q (synchronised).
// Latency: two clock cycles from d to q. No reset: the stages flush
// themselves within two cycles. Two stages follow the board's CPLD
// implementation; the width is a parameter.
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end

endmodule
