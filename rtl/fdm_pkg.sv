// fdm_pkg: types and constants shared by the power frequency deviation meter.
//
// A BCD digit is four bits ordered QD QC QB QA (bit 3 .. bit 0), the order
// in which the outputs of a 7490-style decade counter are weighted
// (QA = pin 12 = weight 1, QB = pin 9 = 2, QC = pin 8 = 4, QD = pin 11 = 8).
// The nine encoder outputs are indexed 0..8 for the gates that mark
// 46, 47, 48, 49, 50, 51, 52, 53 and 54 Hz.
package fdm_pkg;

  typedef logic [3:0] bcd_t;

  // Three cascaded decades: digit 0 is DC-1 (units), digit 2 is DC-3 (hundreds).
  localparam int unsigned NUM_DECADES = 3;
  typedef bcd_t [NUM_DECADES-1:0] bcd_count_t;

  // Encoder outputs, one per hertz from 46 Hz to 54 Hz.
  localparam int unsigned FREQ_LO   = 46;
  localparam int unsigned FREQ_HI   = 54;
  localparam int unsigned NUM_GATES = FREQ_HI - FREQ_LO + 1;
  typedef logic [NUM_GATES-1:0] gates_t;

  // Bit positions inside a BCD digit, named after the 7490 outputs.
  localparam int unsigned QA = 0;  // pin 12
  localparam int unsigned QB = 1;  // pin 9
  localparam int unsigned QC = 2;  // pin 8
  localparam int unsigned QD = 3;  // pin 11

endpackage
