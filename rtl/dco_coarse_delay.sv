// dco_coarse_delay: behavioural model of the coarse grain delay line and its
// 128-to-1 tap multiplexer.
//
// The line is a chain of inverter pairs with a tap after every pair; the
// multiplexer, selected by the 7 coarse bits of the control word, passes one
// of the N_TAPS taps on. A higher select means a shorter path: tap
// N_TAPS-1-sel is taken, so the delay from a to y is
//     (N_TAPS - 1 - sel) * T_PAIR_PS + T_MUX_PS
// picoseconds (transport delay, computed when the edge enters). Not
// synthesizable. The tap count is the core's; the select encoding and the
// delays are this model's choices, T_MUX_PS lumping the multiplexer tree with
// the rest of the fixed loop overhead so that the oscillator spans 19.7 to
// 72 MHz.
`timescale 1ps/1ps
module dco_coarse_delay #(
  parameter int unsigned N_TAPS    = 128,
  parameter int unsigned SEL_W     = 7,
  parameter int unsigned T_PAIR_PS = 144,
  parameter int unsigned T_MUX_PS  = 3101
) (
  input  logic             a,
  input  logic [SEL_W-1:0] sel,
  output logic             y
);
  int unsigned d;
  logic q = 1'b1;  // power-up: the stopped ring rests high

  always begin
    d = (N_TAPS - 1 - int'(sel)) * T_PAIR_PS + T_MUX_PS;
    q <= #(d) a;
    @(a);
  end

  assign y = q;
endmodule
