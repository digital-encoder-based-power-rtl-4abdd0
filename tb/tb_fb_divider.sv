// tb_fb_divider: self-checking test of the divide-by-100 feedback counter.
// A square wave on `a` with a random period; `fb` must rise once every 100
// rising edges of `a`, be high for 50 of them and low for 50.
module tb_fb_divider;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0;
  logic fb, fb_d = 1'b1;   // fb starts high out of reset: measure from its first real rise
  int   checks = 0, failures = 0;
  int   a_edges = 0, last_rise = -1, last_fall = -1, n_rise = 0;
  logic a_d = 1'b0;

  fb_divider dut (.clk(clk), .rst_n(rst_n), .a(a), .fb(fb));

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    if (a && !a_d) a_edges++;
    if (fb && !fb_d) begin
      if (last_rise >= 0) begin
        checks++;
        if (a_edges - last_rise != 100) begin failures++; $display("FAIL fb period %0d edges", a_edges - last_rise); end
        n_rise++;
      end
      last_rise = a_edges;
    end
    if (!fb && fb_d && last_rise >= 0) begin
      checks++;
      if (a_edges - last_rise != 50) begin failures++; $display("FAIL fb high for %0d edges", a_edges - last_rise); end
    end
    a_d  = a;
    fb_d = fb;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      automatic int h = $urandom_range(2, 6);
      @(negedge clk); a = 1'b1;
      repeat (h) @(negedge clk);
      a = 1'b0;
      repeat (h) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_rise < 8) begin failures++; $display("FAIL only %0d fb periods", n_rise); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
