// tick_divider: divides the system clock into a timing pulse.
//
// The controllers time their states in whole "ticks" rather than clock
// cycles, so that the lamp durations are set in seconds. A counter runs from
// 0 to DIV-1 and raises `tick` for exactly one clock cycle when it wraps, so
// one tick occurs every DIV cycles, the first DIV cycles after reset.
// The default assumes a 50 MHz board clock and a 1 s tick; neither number
// is given for this design, only that the clock is divided down to set the
// light periods.
//
// Ports: clk, rst_n (asynchronous, active low), tick (output pulse).
module tick_divider #(
  parameter int unsigned DIV = 50_000_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] count;
  logic         wrap;

  assign wrap = (count == W'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else begin
      count <= wrap ? '0 : count + 1'b1;
      tick  <= wrap;
    end
  end

  initial assert (DIV >= 1) else $error("DIV must be at least 1");

endmodule
