// bus_driver: bidirectional data-bus port with a tri-state output.
//
// When en_write_to_bus is high the module drives data_to_bus onto data_bus;
// otherwise it leaves data_bus in high impedance. Whatever is on the bus,
// whichever side drives it, is always returned on data_from_bus, so a slave
// built on it can keep listening to the bus.
//
// Used once in the board's CPLD and once in the host FPGA. Purely
// combinational; the width (16 bits on the board) is a parameter.
module bus_driver #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             en_write_to_bus,
  inout  wire  [WIDTH-1:0] data_bus,
  input  logic [WIDTH-1:0] data_to_bus,
  output logic [WIDTH-1:0] data_from_bus
);

  assign data_bus      = en_write_to_bus ? data_to_bus : {WIDTH{1'bz}};
  assign data_from_bus = data_bus;

endmodule
