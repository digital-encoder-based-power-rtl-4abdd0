// decade_counter: one BCD decade of the pulse counter (DC-1..DC-3), doing
// what a 7490 does when wired as in the meter: QA feeds the divide-by-five
// input so that the four outputs count 0..9 in BCD, and the two reset-to-0
// inputs are driven by the clear.
//
// `cnt` is a one-cycle count event (the 7490 counts on a falling input
// edge; the meter turns each such edge into one event). `clr` is a
// synchronous clear and wins over `cnt`. `carry` is high in the cycle in
// which the digit wraps from 9 to 0, which is the falling edge of QD that
// clocks the next decade of the ripple chain. The output order is
// q[3:0] = QD QC QB QA (pins 11, 8, 9, 12). The document gives the part and
// its wiring; the synchronous single-clock form is this design's choice.
module decade_counter
  import fdm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic cnt,
  output bcd_t q,
  output logic carry
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (clr)    q <= '0;
    else if (cnt)    q <= (q == bcd_t'(9)) ? '0 : q + bcd_t'(1);
  end

  assign carry = cnt && !clr && (q == bcd_t'(9));

endmodule
