// tb_dda_decade: self-checking test of one decade driving assembly.
// A random enable drives the counter; a reference count kept in the
// testbench predicts q and the ripple carry in every cycle, and the carry
// must come exactly once per ten enabled cycles.
module tb_dda_decade;
  timeunit 1ns; timeprecision 1ps;
  import fdm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  bcd_t q;
  logic rco;
  int   checks = 0, failures = 0;
  int   ref_q = 0, n_en = 0, n_rco = 0;

  dda_decade dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q), .rco(rco));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (q=%0d ref=%0d)", what, q, ref_q); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      #1;
      check(q == bcd_t'(ref_q), "count value");
      check(rco == (en && ref_q == 9), "ripple carry");
      if (en) begin n_en++; if (ref_q == 9) n_rco++; end
      @(posedge clk);
      if (en) ref_q = (ref_q + 1) % 10;
    end
    check(n_rco == n_en / 10, "one carry per ten enabled cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
