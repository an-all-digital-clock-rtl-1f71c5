// range_detector: decides whether the measured frequency error is small
// enough for bang-bang tracking.
//
// The counter remainder register (CRR) holds N minus the number of out_clk
// cycles counted in one ref_clk period, in two's complement. When its
// MSBS most significant bits are all zeroes or all ones the value lies in
// [-2^(W-MSBS), 2^(W-MSBS)-1]; with the 13-bit CRR and MSBS = 10 that is
// -8 .. +7, the window the core uses. The output EBB (enable bang-bang) is
// then 1. Purely combinational.
`timescale 1ps/1ps
module range_detector
  import dpll_pkg::*;
#(
  parameter int unsigned MSBS = 10
) (
  input  crr_t crr,
  output logic ebb
);
  logic [MSBS-1:0] top;
  assign top = crr[CNT_W-1 -: MSBS];
  assign ebb = (&top) | ~(|top);
endmodule
