// ref_timebase: the stable low-frequency gate of the meter.
//
// The 1 MHz crystal clock is divided by 10 in each of N_DDA cascaded decade
// stages (DDA-1..DDA-4: 1 MHz -> 100 Hz), then by 2 in FF-1 (50 Hz) and by
// 2 in FF-2 (25 Hz). FF-2's Q is the gate signal B: high for 20 ms, low for
// 20 ms. While B is high the pulse train is counted; its complement B_n
// (FF-2's Q-bar) holds the counters cleared while B is low.
//
// Timing, in clock cycles with DIV = 10^N_DDA: `tick` pulses once every DIV
// cycles, `f50` has period 2*DIV, `b` has period 4*DIV and stays high for
// exactly 2*DIV cycles (20 000 cycles, 20 ms, at the defaults). FF-2 toggles
// when FF-1 goes from 1 to 0, as a negative-edge JK flip-flop clocked by
// FF-1 would. Chain lengths and ratios follow the document; the synchronous
// form, in which every flip-flop runs on the one crystal clock with enables,
// is this design's choice.
module ref_timebase
  import fdm_pkg::*;
#(
  parameter int unsigned N_DDA = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick,   // one cycle every 10^N_DDA cycles (100 Hz at defaults)
  output logic f50,    // FF-1 Q (50 Hz at defaults)
  output logic b,      // FF-2 Q, gate signal B (25 Hz at defaults)
  output logic b_n     // FF-2 Q-bar, counter clear
);

  logic [N_DDA:0] en;
  bcd_t           dda_q [N_DDA];
  logic           f50_n;

  assign en[0] = 1'b1;

  for (genvar i = 0; i < N_DDA; i++) begin : g_dda
    dda_decade u_dda (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en[i]),
      .q    (dda_q[i]),
      .rco  (en[i+1])
    );
  end

  assign tick = en[N_DDA];

  toggle_ff u_ff1 (
    .clk  (clk),
    .rst_n(rst_n),
    .t    (tick),
    .q    (f50),
    .q_n  (f50_n)
  );

  // FF-2 is clocked by the falling edge of FF-1.
  toggle_ff u_ff2 (
    .clk  (clk),
    .rst_n(rst_n),
    .t    (tick & f50),
    .q    (b),
    .q_n  (b_n)
  );

endmodule
