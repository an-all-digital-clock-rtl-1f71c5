// pdbb: bang-bang decision for the tracking phase.
//
// Looks at the signed counter remainder (N minus counted out_clk cycles)
// and produces the two selects of the offset multiplexers:
//   e  = 1 when there is an error to correct (remainder not zero);
//   el = 1 when out_clk is early (more cycles than N were counted, the
//        remainder is negative): the loop then steps the control word by -1,
//        otherwise by +1.
// A higher control word means a shorter DCO period in this design. The
// meaning of E and E/L is this design's reading of the two select names;
// combinational, no state.
`timescale 1ps/1ps
module pdbb
  import dpll_pkg::*;
(
  input  crr_t crr,
  output logic e,
  output logic el
);
  assign e  = (crr != '0);
  assign el = crr[CNT_W-1];
endmodule
