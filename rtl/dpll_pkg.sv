// dpll_pkg: widths and shared types of the all-digital clock generator.
//
// The control word is 11 bits (7 coarse + 4 fine) and the out_clk cycle
// counter and its remainder register are 13 bits wide, as in the logic
// design of the core. The width of the harmonic N (12 bits), of the signed
// loop offset (12 bits) and of the signed gain exponent (5 bits) are choices
// of this design: 12 bits of N cover 72 MHz / 32 kHz = 2250 with margin, and a
// 12-bit signed offset can move the control word across its whole range.
`timescale 1ps/1ps
package dpll_pkg;
  localparam int unsigned CW_W     = 11;  // DCO control word
  localparam int unsigned COARSE_W = 7;   // coarse delay line MUX select
  localparam int unsigned FINE_W   = 4;   // fine delay line code
  localparam int unsigned CNT_W    = 13;  // cycle counter / CRR
  localparam int unsigned N_W      = 12;  // harmonic N
  localparam int unsigned OFS_W    = 12;  // signed offset into the adder
  localparam int unsigned SH_W     = 5;   // signed power-of-two gain exponent

  typedef logic [CW_W-1:0]         ctrl_t;
  typedef logic signed [CNT_W-1:0] crr_t;
  typedef logic signed [OFS_W-1:0] ofs_t;
  typedef logic signed [SH_W-1:0]  shift_t;
  typedef logic [N_W-1:0]          nmult_t;

  localparam ctrl_t CTRL_MAX = '1;
endpackage
