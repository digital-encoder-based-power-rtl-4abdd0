// tb_bcd_pulse_counter: self-checking test of gate G-0 and the three
// cascaded decades. Windows of gate B carry a known number of pulses of A;
// at the end of each window the BCD count must equal that number, and
// while B is low the count must be held at zero. The nine rows of the
// document's counter table (92..108 pulses for 46..54 Hz) are checked digit
// by digit, then random pulse numbers 0..199; one window ends with A high,
// whose fall together with B must not be counted.
module tb_bcd_pulse_counter;
  timeunit 1ns; timeprecision 1ps;
  import fdm_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0;
  logic       and_out;
  bcd_count_t count;
  int         checks = 0, failures = 0;

  bcd_pulse_counter dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .clr(~b),
                         .and_out(and_out), .count(count));

  always #5 clk = ~clk;

  // Counter outputs of the document's table, DC-3 DC-2 DC-1 as QD QC QB QA.
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

  function automatic int count_value(input bcd_count_t c);
    return int'(c[2]) * 100 + int'(c[1]) * 10 + int'(c[0]);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s count=%0d", what, count_value(count)); end
  endtask

  // One window of B with n pulses of A; a_high_at_end leaves A high as B falls.
  task automatic window(input int n, input bit a_high_at_end, output int got);
    @(negedge clk); b = 1'b1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      a = 1'b1; #1 check(and_out == 1'b1, "G-0 passes A while B is high");
      repeat (2) @(negedge clk);
      a = 1'b0;
      repeat (2) @(negedge clk);
    end
    if (a_high_at_end) a = 1'b1;
    repeat (2) @(negedge clk);
    got = count_value(count);
    b = 1'b0;
    #1 check(and_out == 1'b0, "G-0 blocks A while B is low");
    repeat (2) @(negedge clk);
    a = 1'b0;
    check(count_value(count) == 0, "count cleared while B is low");
    repeat (3) @(negedge clk);
    check(count_value(count) == 0, "count held at zero while B is low");
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 46; f <= 54; f++) begin
      window(2 * f, 1'b0, got);
      check(got == 2 * f, $sformatf("pulses counted at %0d Hz", f));
    end
    // Digit-by-digit check against the table: run the window again and
    // sample the outputs just before B falls.
    for (int f = 46; f <= 54; f++) begin
      @(negedge clk); b = 1'b1;
      repeat (2) @(negedge clk);
      for (int i = 0; i < 2 * f; i++) begin
        a = 1'b1; repeat (2) @(negedge clk);
        a = 1'b0; repeat (2) @(negedge clk);
      end
      check({count[2], count[1], count[0]} == table_row(f), $sformatf("table row %0d Hz", f));
      b = 1'b0;
      repeat (4) @(negedge clk);
    end
    for (int k = 0; k < 30; k++) begin
      automatic int n = $urandom_range(0, 199);
      window(n, 1'b0, got);
      check(got == n, $sformatf("random window of %0d pulses", n));
    end
    window(37, 1'b1, got);
    check(got == 37, "A still high when B falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
