// offset_mux: the three-level multiplexer network that picks the offset
// added to the control word every update.
//
//   level 1 (select el):  -1 when el, +1 otherwise (two's complement);
//   level 2 (select e):   the level-1 value when e, 0 otherwise;
//   level 3 (select ebb): the level-2 bang-bang value when ebb, the scaled
//                         remainder from the shifter otherwise.
// Combinational.
`timescale 1ps/1ps
module offset_mux
  import dpll_pkg::*;
(
  input  ofs_t shifted,
  input  logic ebb,
  input  logic e,
  input  logic el,
  output ofs_t offset
);
  ofs_t step, bb;
  assign step   = el ? ofs_t'(-1) : ofs_t'(1);
  assign bb     = e ? step : '0;
  assign offset = ebb ? bb : shifted;
endmodule
