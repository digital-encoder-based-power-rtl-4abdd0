// tb_freq_dev_meter: end-to-end test of the whole meter at its default
// size: 1 MHz clock, 20 ms gate window, PLL multiplying by 100.
//
// A square wave stands for the signal under test. It drives a behavioural
// model of the PLL, whose oscillator output is the meter's pulse train and
// whose loop is closed through the meter's divide-by-100 output. The test
// steps the frequency through 50, 46, 47, ..., 54, 45 and 55 Hz, each
// offset by +0.25 Hz so that the number of pulses in a window (2 per
// hertz, plus a fraction that depends on the phase) is 2f or 2f+1, which
// the encoder reads as the same frequency. After the PLL has settled, in
// each measured window it checks:
//   - the final BCD count is 2f or 2f+1,
//   - the pulses on each encoder output match the document's table
//     (G-52 fires once at 53 and 54 Hz; see tb_deviation_gates),
//   - the latched levels form the thermometer code for f,
//   - B is high 20 000 cycles and has a 40 000-cycle period.
// It also counts each mechanism (unit-to-tens and tens-to-hundreds carries,
// the clear, each encoder output firing, latch loads, readings below, at
// and above 50 Hz and outside the 46..54 Hz range) and fails any that never
// happened.
module tb_freq_dev_meter;
  timeunit 1ns; timeprecision 1ps;
  import fdm_pkg::*;

  localparam int SETTLE_WINDOWS  = 8;
  localparam int MEASURE_WINDOWS = 2;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       sut = 1'b0;
  logic       sig_a, pll_fb, gate_b, clear, and_out, level_update;
  bcd_count_t count;
  gates_t     gate, level;
  int         checks = 0, failures = 0;

  realtime    sut_half_ns = 1.0e9 / (2.0 * 50.25);

  freq_dev_meter dut (
    .clk(clk), .rst_n(rst_n), .sig_a(sig_a), .pll_fb(pll_fb),
    .gate_b(gate_b), .clear(clear), .and_out(and_out), .count(count),
    .gate(gate), .level(level), .level_update(level_update)
  );

  pll_x100_model u_pll (.sig_in(sut), .fb_in(pll_fb), .vco_out(sig_a));

  always #500 clk = ~clk;                 // 1 MHz crystal

  initial forever begin
    #(sut_half_ns);
    sut = ~sut;
  end

  // Pulses per encoder output, rows 46..54 Hz.
  int pulses_tbl [9][9] = '{
    '{1, 0, 0, 0, 0, 0, 0, 0, 0},
    '{1, 1, 0, 0, 0, 0, 0, 0, 0},
    '{2, 1, 1, 0, 0, 0, 0, 0, 0},
    '{2, 1, 1, 1, 0, 0, 0, 0, 0},
    '{2, 1, 1, 1, 1, 0, 0, 0, 0},
    '{2, 1, 1, 1, 1, 1, 0, 0, 0},
    '{2, 1, 1, 1, 1, 1, 1, 0, 0},
    '{2, 1, 1, 1, 1, 2, 1, 1, 0},
    '{2, 1, 1, 1, 1, 2, 1, 1, 1}
  };

  function automatic int count_value(input bcd_count_t c);
    return int'(c[2]) * 100 + int'(c[1]) * 10 + int'(c[0]);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- observation, sampled at the falling clock edge ----------------------
  int     cyc = 0;
  logic   b_d = 1'b0;
  gates_t g_d = '0;
  int     win_pulses [9];
  int     last_rise = -1;
  int     final_count = -1;
  int     windows_done = 0;
  int     n_carry1 = 0, n_carry2 = 0, n_clear = 0, n_update = 0;
  int     n_fired [9];
  int     n_below = 0, n_nominal = 0, n_above = 0, n_out_of_range = 0;
  bit     measuring = 1'b0;
  int     f_now = 50;
  bit     after_fall = 1'b0;
  bcd_count_t c_d = '0;

  initial foreach (n_fired[k]) n_fired[k] = 0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (gate_b && c_d[0] == 4'd9 && count[0] == 4'd0) n_carry1++;
    if (gate_b && c_d[1] == 4'd9 && count[1] == 4'd0) n_carry2++;
    c_d = count;
    for (int k = 0; k < 9; k++) if (gate[k] && !g_d[k]) begin
      win_pulses[k]++;
      n_fired[k]++;
    end
    if (gate_b && !b_d) begin
      if (last_rise >= 0) check(cyc - last_rise == 40_000, $sformatf("B period %0d cycles", cyc - last_rise));
      last_rise = cyc;
      foreach (win_pulses[k]) win_pulses[k] = 0;
    end
    if (!gate_b && b_d) begin
      check(cyc - last_rise == 20_000, $sformatf("B high for %0d cycles", cyc - last_rise));
      check(level_update == 1'b1, "latch loads right after B falls");
      final_count = count_value(count);
      if (measuring) check_window();
      windows_done++;
    end
    if (after_fall) begin
      // One cycle after B fell: the clear has taken effect and the
      // latches hold this window's levels.
      check(count_value(count) == 0, "count cleared after the window");
      if (final_count > 0 && count_value(count) == 0) n_clear++;
      if (measuring) check(level == thermometer(f_now),
                           $sformatf("%0d Hz: levels %b, expected %b", f_now, level, thermometer(f_now)));
    end
    after_fall = !gate_b && b_d;
    if (level_update) n_update++;
    b_d = gate_b;
    g_d = gate;
  end

  function automatic gates_t thermometer(input int f);
    gates_t t = '0;
    for (int k = 0; k < 9; k++) t[k] = (f >= 46 + k);
    return t;
  endfunction

  task automatic check_window();
    int lo = 2 * f_now;
    int row;
    check(final_count == lo || final_count == lo + 1,
          $sformatf("%0d Hz: count %0d, expected %0d or %0d", f_now, final_count, lo, lo + 1));
    if (f_now < 46) begin
      for (int k = 0; k < 9; k++)
        check(win_pulses[k] == 0, $sformatf("%0d Hz: gate %0d fired", f_now, 46 + k));
    end else begin
      row = (f_now > 54) ? 8 : f_now - 46;
      for (int k = 0; k < 9; k++)
        check(win_pulses[k] == pulses_tbl[row][k],
              $sformatf("%0d Hz: gate %0d gave %0d pulses, table %0d", f_now, 46 + k, win_pulses[k], pulses_tbl[row][k]));
    end
  endtask

  // ---- stimulus ------------------------------------------------------------
  task automatic run_frequency(input int f);
    int w0;
    f_now       = f;
    sut_half_ns = 1.0e9 / (2.0 * (real'(f) + 0.25));
    measuring   = 1'b0;
    w0 = windows_done;
    wait (windows_done == w0 + SETTLE_WINDOWS);
    @(posedge gate_b);
    measuring = 1'b1;
    wait (windows_done == w0 + SETTLE_WINDOWS + MEASURE_WINDOWS);
    @(negedge clk); @(negedge clk);   // let the level check run
    measuring = 1'b0;
    $display("%0d.25 Hz: last count %0d, levels %b, PLL at %.2f Hz", f, final_count, level, u_pll.freq_hz());
    if (f < 46 || f > 54) n_out_of_range++;
    else if (f < 50) n_below++;
    else if (f == 50) n_nominal++;
    else n_above++;
  endtask

  initial begin
    #(1000.0 * 6_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run_frequency(50);
    for (int f = 46; f <= 55; f++) run_frequency(f);
    run_frequency(45);
    check(n_carry1 > 0, "units-to-tens carry happened");
    check(n_carry2 > 0, "tens-to-hundreds carry happened");
    check(n_clear > 0, "clear of a non-zero count happened");
    check(n_update > 0, "latch load happened");
    for (int k = 0; k < 9; k++) check(n_fired[k] > 0, $sformatf("encoder output %0d fired", 46 + k));
    check(n_below > 0 && n_nominal > 0 && n_above > 0 && n_out_of_range > 0,
          "readings below, at, above and outside the range");
    $display("mechanisms: carries %0d/%0d, clears %0d, latch loads %0d, below %0d, nominal %0d, above %0d, out of range %0d",
             n_carry1, n_carry2, n_clear, n_update, n_below, n_nominal, n_above, n_out_of_range);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
