// dco_fine_delay: behavioural model of the differential fine grain delay
// line.
//
// The line has N_STAGES NAND stages. Stage i passes the edge through a
// 2-input NAND when its control c[i] is 1 and through a 3-input NAND when it
// is 0; the 3-input gate is slower by DELTA_PS, about a tenth of a gate
// delay, which is what gives the oscillator its sub-gate resolution. The
// 4-bit code is decoded into the thermometer code c[i] = (i < code), so the
// delay from a to y is
//     N_STAGES * T_NAND_PS + (N_STAGES - code) * DELTA_PS.
// A higher code is faster. Sixteen codes cover 16 to 1 slow stages, so one
// stage stays slow even at the top code. An even number of inverting stages makes the line
// non-inverting. Transport delay, not synthesizable. The stage count and the
// 2-input/3-input principle are the core's; the delays, the thermometer
// decoding and its direction are this model's choices.
`timescale 1ps/1ps
module dco_fine_delay #(
  parameter int unsigned N_STAGES  = 16,
  parameter int unsigned CODE_W    = 4,
  parameter int unsigned T_NAND_PS = 90,
  parameter int unsigned DELTA_PS  = 9
) (
  input  logic              a,
  input  logic [CODE_W-1:0] code,
  output logic              y
);
  logic [N_STAGES-1:0] c;     // thermometer controls, 1 = fast (2-input) path
  int unsigned d;

  always_comb
    for (int i = 0; i < N_STAGES; i++)
      c[i] = (i < int'(code));

  logic q = 1'b1;  // power-up: the stopped ring rests high

  always begin
    d = N_STAGES * T_NAND_PS + (N_STAGES - $countones(c)) * DELTA_PS;
    q <= #(d) a;
    @(a);
  end

  assign y = q;
endmodule
