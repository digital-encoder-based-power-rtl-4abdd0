// output_latch: turns the pulses of the encoder gates into steady levels
// for a display or a control input.
//
// Each gate output sets a sticky flag while gate B is high. In the cycle
// after B falls, while the counters still hold the final count of the
// window, the flags (together with the gates' present outputs) are copied
// to `level` and cleared for the next window; `update` pulses in that
// cycle. `level` therefore holds, for a whole 40 ms period, which gates
// fired during the previous 20 ms window: a thermometer code with one more
// bit set for each hertz from 46 Hz (only bit 0) to 54 Hz (all nine).
//
// The document states that latches on the gate outputs give stable high or
// low levels, but not how they are set or cleared; set-on-pulse flags,
// transferred at the end of each window, are this design's choice.
module output_latch
  import fdm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   b,        // gate B (FF-2 Q)
  input  gates_t g,        // encoder gate outputs
  output gates_t level,    // latched levels of the last complete window
  output logic   update    // one cycle when `level` is loaded
);

  gates_t seen;
  logic   b_d;

  assign update = b_d & ~b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen  <= '0;
      b_d   <= 1'b0;
      level <= '0;
    end else begin
      b_d <= b;
      if (update) begin
        level <= seen | g;
        seen  <= '0;
      end else if (b) begin
        seen  <= seen | g;
      end
    end
  end

endmodule
