// tb_toggle_ff: self-checking test of the divide-by-two flip-flop. Random
// toggle enables; the output must flip exactly on enabled edges and the
// complement output must always be its inverse.
module tb_toggle_ff;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, t = 1'b0;
  logic q, q_n;
  logic ref_q = 1'b0;
  int   checks = 0, failures = 0;

  toggle_ff dut (.clk(clk), .rst_n(rst_n), .t(t), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

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
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks += 2;
      if (q !== ref_q)  begin failures++; $display("FAIL q=%b ref=%b", q, ref_q); end
      if (q_n !== ~q)   begin failures++; $display("FAIL q_n=%b q=%b", q_n, q); end
      t = $urandom_range(0, 1) == 1;
      @(posedge clk);
      if (t) ref_q = ~ref_q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
