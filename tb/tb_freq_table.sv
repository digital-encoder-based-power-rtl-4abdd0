// tb_freq_table: the meter at its default size, fed directly with the
// pulse train an ideal x100 multiplier would give, at exactly 46, 47, ...,
// 54 Hz. With an exact frequency f the 20 ms window holds exactly 2f
// pulses, so the BCD counter outputs at the end of each window must equal
// the expected row (92..108 pulses, DC-3 DC-2 DC-1 as QD QC QB QA), the
// encoder outputs must give the expected pulse numbers and the latched
// levels the thermometer code. Each frequency is held for three windows;
// the first, which may straddle the change, is not checked.
module tb_freq_table;
  timeunit 1ns; timeprecision 1ps;
  import fdm_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, sig_a = 1'b0;
  logic       pll_fb, gate_b, clear, and_out, level_update;
  bcd_count_t count;
  gates_t     gate, level;
  int         checks = 0, failures = 0;
  realtime    half_ns = 1.0e9 / (2.0 * 5000.0);
  int         f_now = 46;
  bit         measuring = 1'b0;
  int         windows_done = 0;

  freq_dev_meter dut (
    .clk(clk), .rst_n(rst_n), .sig_a(sig_a), .pll_fb(pll_fb),
    .gate_b(gate_b), .clear(clear), .and_out(and_out), .count(count),
    .gate(gate), .level(level), .level_update(level_update)
  );

  always #500 clk = ~clk;

  initial begin
    #37_300;                       // arbitrary phase against the window
    forever begin
      #(half_ns);
      sig_a = ~sig_a;
    end
  end

  function automatic logic [11:0] table_row(input int f);
    case (f)
      46: return 12'b0000_1001_0010;
      47: return 12'b0000_1001_0100;
      48: return 12'b0000_1001_0110;
      49: return 12'b0000_1001_1000;
      50: return 12'b0001_0000_0000;
      51: return 12'b0001_0000_0010;
      52: return 12'b0001_0000_0100;
      53: return 12'b0001_0000_0110;
      54: return 12'b0001_0000_1000;
      default: return 12'hfff;
    endcase
  endfunction

  // Pulses per encoder output (G-46..G-54), rows 46..54 Hz.
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic   b_d = 1'b0, after_fall = 1'b0;
  gates_t g_d = '0;
  int     win_pulses [9];

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < 9; k++) if (gate[k] && !g_d[k]) win_pulses[k]++;
    if (gate_b && !b_d) foreach (win_pulses[k]) win_pulses[k] = 0;
    if (after_fall && measuring) begin
      automatic gates_t t = '0;
      for (int k = 0; k < 9; k++) t[k] = (f_now >= 46 + k);
      check(level == t, $sformatf("%0d Hz: levels %b", f_now, level));
    end
    if (!gate_b && b_d) begin
      if (measuring) begin
        check({count[2], count[1], count[0]} == table_row(f_now),
              $sformatf("%0d Hz: counters %h %h %h", f_now, count[2], count[1], count[0]));
        for (int k = 0; k < 9; k++)
          check(win_pulses[k] == pulses_tbl[f_now-46][k],
                $sformatf("%0d Hz: gate %0d gave %0d pulses", f_now, 46 + k, win_pulses[k]));
      end
      windows_done++;
    end
    after_fall = !gate_b && b_d;
    b_d = gate_b;
    g_d = gate;
  end

  initial begin
    #(1000.0 * 2_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 46; f <= 54; f++) begin
      automatic int w0 = windows_done;
      f_now   = f;
      half_ns = 1.0e9 / (2.0 * 100.0 * real'(f));
      measuring = 1'b0;
      wait (windows_done == w0 + 1);
      @(posedge gate_b);
      measuring = 1'b1;
      wait (windows_done == w0 + 3);
      @(negedge clk); @(negedge clk);
      $display("%0d Hz: counters %h%h%h, levels %b", f, count[2], count[1], count[0], level);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
