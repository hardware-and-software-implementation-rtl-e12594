// sawtooth_gen: two's-complement ramp for testing a DAC channel.
//
// A WIDTH-bit counter starts at the most negative value (-2^(WIDTH-1), -0x2000
// for 14 bits) after reset and counts up by one on every clock edge on which
// en is high. After the most positive value (+0x1FFF) it wraps to the most
// negative one again, so a DAC fed with dat_o produces a sawtooth with a period
// of 2^WIDTH enabled cycles (81.92 us at 200 MHz for 14 bits).
//
// Interface: clk_i, rst_i (asynchronous, active high), en, dat_o (registered).
// The 14-bit width and the up-count from -0x2000 to +0x1FFF follow the
// board's test routine; the enable input lets the host side step the ramp
// once per bus transfer.
module sawtooth_gen #(
  parameter int unsigned WIDTH = 14
) (
  input  logic             clk_i,
  input  logic             rst_i,
  input  logic             en,
  output logic [WIDTH-1:0] dat_o
);

  localparam logic [WIDTH-1:0] MOST_NEG = {1'b1, {(WIDTH-1){1'b0}}};

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i)   dat_o <= MOST_NEG;
    else if (en) dat_o <= dat_o + 1'b1;   // +0x1FFF + 1 wraps to -0x2000
  end

endmodule
