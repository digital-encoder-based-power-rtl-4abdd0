// tb_deviation_gates: self-checking test of the encoder gates.
// First every count 0..199 is applied and each gate is compared with the
// set of counts it should decode, written from the counts rather than from
// the counter bits. Then, for each frequency from 46 Hz to 54 Hz, the count
// is walked from 0 up to 2 pulses per hertz and back to 0 (the clear), and
// the pulses on each gate are counted and compared with the document's
// table of pulse numbers. That table prints 2 for G-52 at 53 and 54 Hz;
// G-52 is high for the contiguous counts 104..107 with the connections of
// the circuit diagram, so one pulse is expected there.
module tb_deviation_gates;
  timeunit 1ns; timeprecision 1ps;
  import fdm_pkg::*;

  bcd_count_t count;
  gates_t     g;
  int         checks = 0, failures = 0;

  deviation_gates dut (.count(count), .g(g));

  function automatic bcd_count_t to_bcd(input int n);
    bcd_count_t c;
    c[0] = bcd_t'(n % 10);
    c[1] = bcd_t'((n / 10) % 10);
    c[2] = bcd_t'((n / 100) % 10);
    return c;
  endfunction

  function automatic gates_t expect_gates(input int n);
    int u = n % 10, t = (n / 10) % 10, h = (n / 100) % 10;
    bit nine = (t == 9), odd_h = (h % 2 == 1);
    bit u_2367 = (u == 2 || u == 3 || u == 6 || u == 7);
    bit u_4567 = (u >= 4 && u <= 7);
    bit u_67 = (u == 6 || u == 7);
    bit u_89 = (u >= 8);
    gates_t e;
    e[0] = nine && u_2367;
    e[1] = nine && u_4567;
    e[2] = nine && u_67;
    e[3] = nine && u_89;
    e[4] = odd_h;
    e[5] = odd_h && u_2367;
    e[6] = odd_h && u_4567;
    e[7] = odd_h && u_67;
    e[8] = odd_h && u_89;
    return e;
  endfunction

  // Pulses per gate (G-46..G-54), one row per frequency 46..54 Hz.
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

  initial begin
    for (int n = 0; n < 200; n++) begin
      count = to_bcd(n);
      #1;
      checks++;
      if (g !== expect_gates(n)) begin
        failures++;
        $display("FAIL count %0d: gates %b expected %b", n, g, expect_gates(n));
      end
    end
    for (int f = 46; f <= 54; f++) begin
      automatic int pulses [9];
      automatic gates_t prev = '0;
      foreach (pulses[k]) pulses[k] = 0;
      for (int n = 0; n <= 2 * f + 1; n++) begin
        count = to_bcd(n > 2 * f ? 0 : n);
        #1;
        for (int k = 0; k < 9; k++) if (g[k] && !prev[k]) pulses[k]++;
        prev = g;
      end
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (pulses[k] != pulses_tbl[f-46][k]) begin
          failures++;
          $display("FAIL %0d Hz gate %0d: %0d pulses, table %0d", f, 46 + k, pulses[k], pulses_tbl[f-46][k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
