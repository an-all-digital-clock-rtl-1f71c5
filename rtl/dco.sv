// dco: behavioural model of the digitally controlled ring oscillator.
//
// The ring is one 2-input NAND followed by the fixed delay line (32
// inverters, out_clk is tapped here), the coarse grain delay line with its
// 128-way tap multiplexer and the fine grain delay line of 16 NAND stages,
// whose output closes the loop on the NAND. The NAND is the only inversion in
// the loop, so the period is twice the loop delay L:
//     L = T_NAND + 32 T_INV + T_MUX + (127 - coarse) 2 T_INV
//         + 16 T_NAND + (16 - fine) DELTA
// With the default delays one control step is 9 ps of loop delay (18 ps of
// period), a coarse step (144 ps) equals sixteen fine steps, and the period
// runs from 50.7 ns (19.7 MHz, control word 0) to 13.9 ns (72 MHz, control
// word 2047). ctrl[10:4] selects the coarse tap, ctrl[3:0] the fine code; a
// larger control word gives a higher frequency.
//
// The halt flip-flop is clocked by the rising edge of the NAND output with
// halt as its data input, and its inverted output enables the NAND. A halt
// request therefore stops the ring right after the NAND output has risen:
// no runt pulse, out_clk stays high and halted is 1. Dropping halt clears the
// flip-flop at once (asynchronously), and the ring restarts with a full low
// phase. The flip-flop starts cleared at power-up.
//
// The variable drift_ps (not a port, 0 by default) adds to the loop delay;
// testbenches use it to model slow drift and noise of the cell delays.
//
// This is a timing model, not synthesizable logic: the real block is a
// netlist of standard cells whose delays come from the cell library. A tool
// that ignores the delays sees the ring as a combinational loop through the
// NAND; that loop is the oscillator itself and is intended.
`timescale 1ps/1ps
module dco
  import dpll_pkg::*;
#(
  parameter int unsigned N_FIXED   = 32,
  parameter int unsigned N_COARSE  = 128,
  parameter int unsigned N_FINE    = 16,
  parameter int unsigned T_NAND_PS = 90,
  parameter int unsigned T_INV_PS  = 72,
  parameter int unsigned DELTA_PS  = 9,
  parameter int unsigned T_MUX_PS  = 3101
) (
  input  logic  halt,
  input  ctrl_t ctrl,
  output logic  out_clk,
  output logic  halted
);
  logic nand_y = 1'b1;   // power-up: ring at rest, flip-flop cleared
  logic halt_q = 1'b0;
  logic fixed_y, coarse_y, fine_y;

  // Extra loop delay in ps, 0 unless a testbench sets it to mimic supply,
  // temperature or process drift (it may be negative, down to -T_NAND_PS).
  int drift_ps = 0;

  // ring NAND: one input closes the loop, the other is the halt enable
  always begin
    nand_y <= #(int'(T_NAND_PS) + drift_ps) ~(~halt_q & fine_y);
    @(halt_q or fine_y);
  end

  // halt flip-flop: D = halt, clock = NAND output, cleared while halt is low
  always @(posedge nand_y or negedge halt) begin
    if (!halt) halt_q <= 1'b0;
    else       halt_q <= 1'b1;
  end

  dco_fixed_delay #(.N_INV(N_FIXED), .T_INV_PS(T_INV_PS)) u_fixed (
    .a(nand_y), .y(fixed_y)
  );

  dco_coarse_delay #(
    .N_TAPS(N_COARSE), .SEL_W(COARSE_W), .T_PAIR_PS(2 * T_INV_PS), .T_MUX_PS(T_MUX_PS)
  ) u_coarse (
    .a(fixed_y), .sel(ctrl[CW_W-1 -: COARSE_W]), .y(coarse_y)
  );

  dco_fine_delay #(
    .N_STAGES(N_FINE), .CODE_W(FINE_W), .T_NAND_PS(T_NAND_PS), .DELTA_PS(DELTA_PS)
  ) u_fine (
    .a(coarse_y), .code(ctrl[FINE_W-1:0]), .y(fine_y)
  );

  assign out_clk = fixed_y;
  assign halted  = halt_q;
endmodule
