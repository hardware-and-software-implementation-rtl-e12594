// bus_transceiver: behavioural model of the 16-bit bidirectional bus
// transceiver (74LVTH16245 type) between the host FPGA and the converter
// board. It is a board component, not logic of either programmable device;
// this model exists so the two sides can be simulated together.
//
// dir_i = 0 passes port b (board side) to port a (FPGA side); dir_i = 1 passes
// a to b. The port that is not driven by the transceiver is left in high
// impedance. The output enable of the real part is tied active on the board
// and is not modelled.
//
// Timing: PROP_DELAY delays data in both directions and the direction input
// alike (a single figure for propagation, enable and disable time). The
// default of 0 makes the model ideal; a few nanoseconds, as in the real part,
// can be set to check that the host's wait state covers the delay. Having
// both an ideal and a delayed mode follows the board's simulation set-up; the
// single delay figure is this model's simplification.
//
// The model is a deliberate combinational path in both directions between two
// tri-state nets, so a simulator reports a circular path through a and b;
// only one direction is ever enabled, so the loop is never closed.
module bus_transceiver #(
  parameter int unsigned WIDTH      = 16,
  parameter realtime     PROP_DELAY = 0ns
) (
  inout  wire [WIDTH-1:0] a,
  inout  wire [WIDTH-1:0] b,
  input  logic            dir_i
);

  logic [WIDTH-1:0] a_to_b, b_to_a;
  logic             dir_d;

  if (PROP_DELAY > 0ns) begin : g_delayed
    assign #(PROP_DELAY) a_to_b = a;
    assign #(PROP_DELAY) b_to_a = b;
    assign #(PROP_DELAY) dir_d  = dir_i;
  end else begin : g_ideal
    assign a_to_b = a;
    assign b_to_a = b;
    assign dir_d  = dir_i;
  end

  assign a = dir_d ? {WIDTH{1'bz}} : b_to_a;
  assign b = dir_d ? a_to_b : {WIDTH{1'bz}};

endmodule
