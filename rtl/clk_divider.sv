// clk_divider: programmable clock divider for the converter sampling clocks.
//
// The division constant div_i selects the output:
//   0      output held low (converter clock stopped)
//   1      input clock routed straight to the output
//   n >= 2 input frequency divided by n
// For n >= 2 a counter runs from 0 to n-1 and wraps; the registered output is
// high for the first floor(n/2) counts of each period and low for the rest,
// giving an exact 50 % duty cycle for even n. A new constant takes effect at
// once: a counter already past the new end value wraps on the next edge.
//
// Interface: clk_i, rst_i (asynchronous, active high), div_i, clk_o.
// Timing: for n >= 2 the output rises within n input edges after reset and
// one output period is then exactly n input periods.
// The three cases are the board's; the counter and duty cycle are this
// design's own choice. Case 1 is a combinational clock multiplexer by
// definition, so clk_o is not glitch-free at the moment div_i changes.
module clk_divider #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk_i,
  input  logic             rst_i,
  input  logic [WIDTH-1:0] div_i,
  output logic             clk_o
);

  logic [WIDTH-1:0] cnt, cnt_next;
  logic             div_q;

  always_comb begin
    if (cnt >= div_i - 1'b1) cnt_next = '0;
    else                     cnt_next = cnt + 1'b1;
  end

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else if (div_i < WIDTH'(2)) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else begin
      cnt   <= cnt_next;
      div_q <= cnt_next < (div_i >> 1);
    end
  end

  always_comb begin
    unique case (div_i)
      WIDTH'(0): clk_o = 1'b0;
      WIDTH'(1): clk_o = clk_i;
      default:   clk_o = div_q;
    endcase
  end

endmodule
