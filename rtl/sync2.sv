// sync2: two-flip-flop synchroniser for a bundle of asynchronous inputs.
//
// Push buttons, RF receiver outputs and IR sensor outputs change without
// regard to the system clock. Each bit passes two flip-flops in series
// before the controller uses it, which gives a metastable first stage a
// full clock cycle to settle. Output `q` lags `d` by two clock cycles.
// Reset clears both stages. This stage is this design's own addition.
module sync2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
