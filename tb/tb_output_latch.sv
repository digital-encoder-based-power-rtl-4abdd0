// tb_output_latch: self-checking test of the output latches. Random gate
// pulses are applied during windows of B, including pulses only in the
// last cycle before the latches load; after each window the loaded levels
// must be the OR of everything the gates showed, must stay unchanged for
// the whole next window, and `update` must pulse exactly once per window,
// one cycle after B falls.
module tb_output_latch;
  timeunit 1ns; timeprecision 1ps;
  import fdm_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, b = 1'b0;
  gates_t g = '0, level, expect_level;
  logic   update;
  int     checks = 0, failures = 0, n_update = 0;

  output_latch dut (.clk(clk), .rst_n(rst_n), .b(b), .g(g), .level(level), .update(update));

  always #5 clk = ~clk;

  always @(posedge clk) if (update) n_update++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s level=%b expected=%b", what, level, expect_level); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gates_t acc;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_level = '0;
    for (int w = 0; w < 40; w++) begin
      int u0;
      acc = '0;
      @(negedge clk); b = 1'b1;
      for (int i = 0; i < 30; i++) begin
        g = ($urandom_range(0, 3) == 0) ? gates_t'($urandom) & gates_t'($urandom) : '0;
        acc |= g;
        @(negedge clk);
        check(level == expect_level, "level steady during window");
      end
      // B falls; the gates still show the final count for one cycle.
      b = 1'b0;
      g = (w % 3 == 0) ? gates_t'($urandom) : '0;
      acc |= g;
      u0 = n_update;
      @(negedge clk);
      check(update == 1'b0 && n_update == u0 + 1, "one update right after B falls");
      g = '0;
      expect_level = acc;
      check(level == expect_level, "levels loaded at end of window");
      repeat (5) @(negedge clk);
      check(level == expect_level && n_update == u0 + 1, "levels held while B is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
