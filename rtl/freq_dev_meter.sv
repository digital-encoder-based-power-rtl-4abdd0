// freq_dev_meter: power frequency deviation meter with a digital encoder.
//
// The signal under test (nominally 50 Hz) is multiplied by 100 in an
// external analog PLL into pulse train A (5 kHz at 50 Hz). A 1 MHz crystal
// clock is divided down to gate signal B, high for 20 ms out of every 40 ms.
// The pulses of A that pass AND gate G-0 while B is high are counted by
// three BCD decades, which gives 2 counts per hertz: 100 at 50 Hz, 92 at
// 46 Hz, 108 at 54 Hz. AND gates on the counter outputs (G-46..G-54) fire
// at counts that are reached only at or above their own frequency, so each
// 1 Hz step from 46 Hz to 54 Hz gives its own pattern of pulses on `gate`;
// `level` holds the same information as steady levels for a whole period.
//
// Interface: `clk` is the crystal clock (1 MHz for the document's 20 ms
// window; the window is 2*10^N_DDA cycles). `sig_a` is the PLL output,
// asynchronous, synchronized here. `pll_fb` is the divide-by-100 feedback
// back to the PLL's phase comparator. `gate_b`/`clear` are FF-2's Q and
// Q-bar, `and_out` is G-0's output and `count` the three BCD digits
// (count[0] = DC-1). `gate[k]` is the encoder output for 46+k Hz (bit 4 is
// DC-3 pin 12, the 50 Hz output); `level` and `level_update` come from the
// output latches. A count appears three cycles after the edge of `sig_a`
// (two for the synchronizer, one for the counter).
//
// The structure is the document's circuit; the analog PLL, transformer,
// switch and crystal oscillator lie outside. Running everything on the one
// crystal clock, the synchronizer and the exact form of the latches are
// this design's choices.
module freq_dev_meter
  import fdm_pkg::*;
#(
  parameter int unsigned N_DDA  = 4,    // decade stages in the timebase
  parameter int unsigned FB_DIV = 100   // PLL multiplication factor
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sig_a,        // PLL output, pulse train A
  output logic       pll_fb,       // to the PLL phase comparator
  output logic       gate_b,       // FF-2 Q, signal B
  output logic       clear,        // FF-2 Q-bar, counter clear
  output logic       and_out,      // G-0 output
  output bcd_count_t count,        // DC-3, DC-2, DC-1 outputs
  output gates_t     gate,         // G-46..G-54 (bit 4: DC-3 pin 12)
  output gates_t     level,        // latched gate levels of the last window
  output logic       level_update  // one cycle when `level` is loaded
);

  logic a_sync;
  logic tick, f50;

  sync_2ff u_sync (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (sig_a),
    .q    (a_sync)
  );

  fb_divider #(.DIV(FB_DIV)) u_fb (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (a_sync),
    .fb   (pll_fb)
  );

  ref_timebase #(.N_DDA(N_DDA)) u_tb (
    .clk  (clk),
    .rst_n(rst_n),
    .tick (tick),
    .f50  (f50),
    .b    (gate_b),
    .b_n  (clear)
  );

  bcd_pulse_counter u_cnt (
    .clk    (clk),
    .rst_n  (rst_n),
    .a      (a_sync),
    .b      (gate_b),
    .clr    (clear),
    .and_out(and_out),
    .count  (count)
  );

  deviation_gates u_gates (
    .count(count),
    .g    (gate)
  );

  output_latch u_latch (
    .clk   (clk),
    .rst_n (rst_n),
    .b     (gate_b),
    .g     (gate),
    .level (level),
    .update(level_update)
  );

endmodule
