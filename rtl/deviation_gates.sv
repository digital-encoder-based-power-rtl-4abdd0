// deviation_gates: the encoder, AND gates G-46..G-54 on the outputs of the
// three decade counters.
//
// Each gate goes high while the running count is in a set of values that
// the count passes through, or stops at, only when the frequency under test
// is at or above its own frequency. With 2 pulses counted per hertz in a
// 20 ms window (100 pulses at 50 Hz), the gates decode:
//
//   gate  inputs (pin/counter)      high for counts
//   G-46  9/1  12/2 11/2            92-93, 96-97
//   G-47  8/1  12/2 11/2            94-97
//   G-48  8/1  9/1  11/2 12/2       96-97
//   G-49  11/2 12/2 11/1            98-99
//   50 Hz 12/3 (no gate)            100-199
//   G-51  9/1  12/3                 102-103, 106-107, ...
//   G-52  8/1  12/3                 104-107, ...
//   G-53  8/1  9/1  12/3            106-107, ...
//   G-54  11/1 12/3                 108-109, ...
//
// Pins are those of a 7490: 12 = QA, 9 = QB, 8 = QC, 11 = QD; "/n" names the
// counter DC-n. The connections are the document's. Purely combinational;
// `g[k]` is the output for 46+k Hz.
module deviation_gates
  import fdm_pkg::*;
(
  input  bcd_count_t count,
  output gates_t     g
);

  bcd_t dc1, dc2, dc3;
  assign dc1 = count[0];
  assign dc2 = count[1];
  assign dc3 = count[2];

  always_comb begin
    g[0] = dc1[QB] & dc2[QA] & dc2[QD];                // G-46
    g[1] = dc1[QC] & dc2[QA] & dc2[QD];                // G-47
    g[2] = dc1[QC] & dc1[QB] & dc2[QD] & dc2[QA];      // G-48
    g[3] = dc2[QD] & dc2[QA] & dc1[QD];                // G-49
    g[4] = dc3[QA];                                    // 50 Hz, DC-3 pin 12
    g[5] = dc1[QB] & dc3[QA];                          // G-51
    g[6] = dc1[QC] & dc3[QA];                          // G-52
    g[7] = dc1[QC] & dc1[QB] & dc3[QA];                // G-53
    g[8] = dc1[QD] & dc3[QA];                          // G-54
  end

endmodule
