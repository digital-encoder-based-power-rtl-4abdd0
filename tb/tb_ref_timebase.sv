// tb_ref_timebase: self-checking test of the reference timebase at its
// default size (four decade stages). With a 1 MHz clock the gate signal B
// must be high for 20 ms (20 000 cycles) and have a 40 ms period; the 100 Hz
// tick must come every 10 000 cycles and the 50 Hz FF-1 output must have a
// 20 000-cycle period. B_n must always be the complement of B.
module tb_ref_timebase;
  timeunit 1ns; timeprecision 1ps;

  localparam int DIV = 10_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tick, f50, b, b_n;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  int   last_tick = -1, last_b_rise = -1, last_b_fall = -1, last_f50_rise = -1;
  logic b_d = 1'b0, f50_d = 1'b0;
  int   n_tick = 0, n_b_high = 0, n_b_period = 0, n_f50 = 0;

  ref_timebase dut (.clk(clk), .rst_n(rst_n), .tick(tick), .f50(f50), .b(b), .b_n(b_n));

  always #500 clk = ~clk;   // 1 MHz

  task automatic check(input bit ok, input string what, input int got);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: %0d", what, got); end
  endtask

  initial begin
    #(1000.0 * 200_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    check(b_n == ~b, "b_n is the complement of b", int'(b_n));
    if (tick) begin
      if (last_tick >= 0) begin check(cyc - last_tick == DIV, "tick period", cyc - last_tick); n_tick++; end
      last_tick = cyc;
    end
    if (f50 && !f50_d) begin
      if (last_f50_rise >= 0) begin check(cyc - last_f50_rise == 2 * DIV, "f50 period", cyc - last_f50_rise); n_f50++; end
      last_f50_rise = cyc;
    end
    if (b && !b_d) begin
      if (last_b_rise >= 0) begin check(cyc - last_b_rise == 4 * DIV, "B period (40 ms)", cyc - last_b_rise); n_b_period++; end
      last_b_rise = cyc;
    end
    if (!b && b_d) begin
      if (last_b_rise >= 0) begin check(cyc - last_b_rise == 2 * DIV, "B high time (20 ms)", cyc - last_b_rise); n_b_high++; end
      last_b_fall = cyc;
    end
    b_d   = b;
    f50_d = f50;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (4 * 4 * DIV + 10) @(posedge clk);
    check(n_tick >= 15, "enough ticks seen", n_tick);
    check(n_b_period >= 3, "enough B periods seen", n_b_period);
    check(n_b_high >= 3, "enough B windows seen", n_b_high);
    check(n_f50 >= 7, "enough f50 periods seen", n_f50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
