// sync_2ff: two-flip-flop synchronizer that brings the asynchronous pulse
// train A (the PLL output) into the crystal clock domain before it is
// counted. The output follows the input two clock cycles later. Reset value
// 0. This helper is this design's own: the discrete circuit counts A
// directly with ripple counters.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
