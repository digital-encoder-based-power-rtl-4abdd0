// toggle_ff: divide-by-two flip-flop of the reference timebase (FF-1, FF-2),
// a JK flip-flop with J = K = 1 such as one half of a 7473.
//
// The output changes state on a rising clock edge whenever `t` is high; a
// one-cycle pulse on `t` every N cycles therefore gives a square wave of
// period 2N cycles. `q_n` is the complement, which the meter uses as the
// clear of its counters. The document gives the parts and their division
// ratios; using a synchronous toggle enable instead of a separate clock and
// an active-low asynchronous reset to 0 are choices of this design.
module toggle_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (t)  q <= ~q;
  end

  assign q_n = ~q;

endmodule
