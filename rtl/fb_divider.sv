// fb_divider: the divide-by-DIV counter in the feedback path of the PLL.
// With it the PLL's oscillator must run at DIV times the input frequency
// for the phase comparator to see equal frequencies, so the PLL becomes a
// x100 multiplier (50 Hz in, 5 kHz pulse train A out).
//
// `a` is the oscillator output, already synchronous to `clk`. Every rising
// edge of `a` advances a modulo-DIV counter; `fb` is high for the first
// DIV/2 counts and low for the rest, a square wave of 1/DIV the frequency
// of `a`, whose rising edge follows the rising edge of `a` that wraps the
// counter by one cycle. After reset the counter
// stands at 0, the first count of the high half. DIV = 100 is the document's value; the duty cycle
// and the synchronous form are this design's.
module fb_divider #(
  parameter int unsigned DIV = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  output logic fb
);

  localparam int unsigned W = $clog2(DIV);

  logic [W-1:0] cnt;
  logic         a_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_d <= 1'b0;
      cnt <= '0;
      fb  <= 1'b1;
    end else begin
      a_d <= a;
      if (a & ~a_d) begin
        cnt <= (cnt == W'(DIV - 1)) ? '0 : cnt + W'(1);
        fb  <= (cnt == W'(DIV - 1)) || (cnt < W'(DIV / 2 - 1));
      end
    end
  end

endmodule
