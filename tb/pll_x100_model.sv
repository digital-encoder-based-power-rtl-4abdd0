// pll_x100_model: behavioural model, for simulation only, of the analog
// phase locked loop that multiplies the signal under test by 100.
//
// The oscillator output `vco_out` is a square wave whose half period is a
// real number. The loop is closed through the meter's divide-by-100 output
// `fb_in`: at every rising edge of `sig_in` the model compares the last
// measured period of `sig_in` with the last measured period of `fb_in` and
// moves the oscillator period part of the way (gain LOOP_GAIN) towards the
// value that makes them equal. This locks the frequency, not the phase,
// which is all the meter depends on. Times are in ns.
module pll_x100_model #(
  parameter real F_START_HZ = 5000.0,
  parameter real LOOP_GAIN  = 0.8
) (
  input  logic sig_in,
  input  logic fb_in,
  output logic vco_out
);
  timeunit 1ns; timeprecision 1ps;

  realtime half_ns = 1.0e9 / (2.0 * F_START_HZ);
  realtime t_in = -1.0, t_fb = -1.0, per_in = 0.0, per_fb = 0.0;
  bit      fb_new = 1'b0;

  initial begin
    vco_out = 1'b0;
    forever begin
      #(half_ns);
      vco_out = ~vco_out;
    end
  end

  always @(posedge fb_in) begin
    if (t_fb >= 0.0) begin
      per_fb = $realtime - t_fb;
      fb_new = 1'b1;
    end
    t_fb = $realtime;
  end

  always @(posedge sig_in) begin
    if (t_in >= 0.0) per_in = $realtime - t_in;
    t_in = $realtime;
    if (fb_new && per_in > 0.0 && per_fb > 0.0) begin
      half_ns = half_ns * (1.0 + LOOP_GAIN * (per_in / per_fb - 1.0));
      fb_new  = 1'b0;
    end
  end

  // Frequency of the oscillator in Hz, for testbench reports.
  function automatic real freq_hz();
    return 1.0e9 / (2.0 * half_ns);
  endfunction

endmodule
