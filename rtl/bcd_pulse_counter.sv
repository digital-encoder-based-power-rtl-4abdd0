// bcd_pulse_counter: gate G-0 and the three cascaded decade counters
// DC-1..DC-3 that count the pulses of train A passed while gate B is high.
//
// G-0 forms A AND B (`and_out`). Each falling edge of that product, caused
// by A falling while B is high, is one count event for DC-1; DC-1 carries
// into DC-2 and DC-2 into DC-3, so `count` holds the number of pulses seen
// so far in the window as three BCD digits (count[0] = DC-1 units, count[2]
// = DC-3 hundreds). `clr` (FF-2 Q-bar) clears all three decades; it is high
// while B is low, so every window starts from 000 and the count of the
// finished window is gone one cycle after B falls.
//
// `a` must already be synchronous to `clk`. A count is visible on `count`
// one cycle after the falling edge of A is seen. An edge of A·B caused by B
// falling is not counted: the clear that comes with it overrides it, which
// is this design's reading of the race in the discrete circuit.
module bcd_pulse_counter
  import fdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a,        // pulse train A, synchronous to clk
  input  logic       b,        // gate B (FF-2 Q)
  input  logic       clr,      // counter clear (FF-2 Q-bar)
  output logic       and_out,  // G-0 output, A·B
  output bcd_count_t count
);

  logic and_q;
  logic [NUM_DECADES:0] cnt;

  assign and_out = a & b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) and_q <= 1'b0;
    else        and_q <= and_out;
  end

  assign cnt[0] = and_q & ~a & b;

  for (genvar i = 0; i < NUM_DECADES; i++) begin : g_dc
    decade_counter u_dc (
      .clk  (clk),
      .rst_n(rst_n),
      .clr  (clr),
      .cnt  (cnt[i]),
      .q    (count[i]),
      .carry(cnt[i+1])
    );
  end

endmodule
