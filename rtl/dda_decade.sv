// dda_decade: one decade driving assembly of the reference timebase, a
// synchronous divide-by-ten counter in the manner of a 74160.
//
// The counter advances on a rising clock edge when `en` is high and wraps
// from 9 to 0. `rco` (ripple carry out) is high while the counter holds 9
// and `en` is high, so it is a one-cycle pulse every tenth enabled cycle;
// wiring `rco` of one stage to `en` of the next cascades decades into a
// synchronous divide-by-10^N chain, as the four DDAs of the timebase are.
// The document gives the part and its role; the single enable (the 74160
// has two, ENP and ENT) and the active-low asynchronous reset to 0 are
// choices of this design. No parallel load is used, as none is wired in
// the timebase.
module dda_decade
  import fdm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output bcd_t q,
  output logic rco
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (en)      q <= (q == bcd_t'(9)) ? '0 : q + bcd_t'(1);
  end

  assign rco = en && (q == bcd_t'(9));

endmodule
