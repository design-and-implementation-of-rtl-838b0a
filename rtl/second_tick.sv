// second_tick: one-second time base.
//
// A free-running counter divides the system clock by CLK_HZ and raises
// `tick` for exactly one clock cycle each time it wraps, i.e. once per
// second of real time. Every timer in the controller (time-of-day clock,
// phase countdown, emergency sequence) advances on this pulse, so the
// whole design runs on one clock with a single clock enable.
//
// Timing: after reset the first tick comes CLK_HZ cycles later, then every
// CLK_HZ cycles. Reset (`rst`) is synchronous and active high.
// The clock frequency is this design's own choice (50 MHz by default); the
// original design does not state it.
module second_tick #(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned W = (CLK_HZ > 1) ? $clog2(CLK_HZ) : 1;

  logic [W-1:0] div;

  always_ff @(posedge clk) begin
    if (rst) begin
      div  <= '0;
      tick <= 1'b0;
    end else if (div == W'(CLK_HZ - 1)) begin
      div  <= '0;
      tick <= 1'b1;
    end else begin
      div  <= div + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
