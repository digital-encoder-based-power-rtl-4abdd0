// tb_decade_counter: self-checking test of one BCD decade. Random count
// events and clears; a reference digit kept in the testbench predicts the
// BCD outputs and the carry, which must come only on the 9 -> 0 wrap.
module tb_decade_counter;
  timeunit 1ns; timeprecision 1ps;
  import fdm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, cnt = 1'b0;
  bcd_t q;
  logic carry;
  int   ref_q = 0, n_carry = 0, n_clr = 0;
  int   checks = 0, failures = 0;

  decade_counter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .cnt(cnt), .q(q), .carry(carry));

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
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cnt = $urandom_range(0, 1) == 1;
      clr = $urandom_range(0, 40) == 0;
      #1;
      checks += 2;
      if (q !== bcd_t'(ref_q)) begin failures++; $display("FAIL q=%0d ref=%0d", q, ref_q); end
      if (carry !== (cnt && !clr && ref_q == 9)) begin failures++; $display("FAIL carry=%b ref=%0d", carry, ref_q); end
      if (carry) n_carry++;
      if (clr) n_clr++;
      @(posedge clk);
      if (clr) ref_q = 0;
      else if (cnt) ref_q = (ref_q + 1) % 10;
    end
    checks += 2;
    if (n_carry < 10) begin failures++; $display("FAIL too few carries %0d", n_carry); end
    if (n_clr < 10)   begin failures++; $display("FAIL too few clears %0d", n_clr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
