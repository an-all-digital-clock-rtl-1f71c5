// dco_fixed_delay: behavioural model of the fixed delay line of the ring
// oscillator, a chain of N_INV inverters (an even number, so the line does
// not invert). out_clk is taken from its output.
//
// It is a transport delay of N_INV * T_INV_PS picoseconds: every edge of a
// reappears at y that much later. Not synthesizable (it models a chain of
// standard cells whose delay only a netlist and a library define). The
// inverter count is the core's; the inverter delay is this model's choice.
`timescale 1ps/1ps
module dco_fixed_delay #(
  parameter int unsigned N_INV    = 32,
  parameter int unsigned T_INV_PS = 72
) (
  input  logic a,
  output logic y
);
  logic q = 1'b1;  // power-up: the stopped ring rests high

  always begin
    q <= #(N_INV * T_INV_PS) a;
    @(a);
  end

  assign y = q;
endmodule
