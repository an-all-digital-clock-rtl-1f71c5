// dpll: all-digital clock generator core (top level).
//
// out_clk is a ring oscillator (dco) whose period is set by an 11-bit
// control word. Every two ref_clk periods the loop measures how many out_clk
// cycles fit in one ref_clk period and corrects the control word:
//   * freq_detector counts out_clk cycles during ref_clk/2 high and leaves
//     CRR = N - count in the counter remainder register;
//   * range_detector raises EBB when CRR is within -8 .. +7;
//   * without EBB (frequency acquisition) the offset is CRR * 2^shift, the
//     power-of-two gain coming from gain_lut (it depends on N and on the
//     current control word) through offset_shifter;
//   * with EBB (tracking) pdbb picks an offset of -1, 0 or +1;
//   * offset_mux selects between the two and control_accumulator adds the
//     offset to the control word (a first-order digital filter).
// lock is EBB of the last valid measurement, registered at the update; it
// drops while the oscillator is halted. halt stops the ring cleanly (halted
// answers); the control word is kept, so on wake-up the oscillator restarts at
// its old frequency and only tracking is needed.
//
// Clocks: out_clk (counter), ref_clk rising (sequencer, gain, control word)
// and ref_clk falling (CRR capture). reset is active high; it must last for
// at least two ref_clk edges. n_mult is sampled at every window start and
// may change at any time: the loop re-acquires the new harmonic.
//
// Everything here is synthesizable except the dco, a timing model of the
// ring oscillator; its ring shows up as a combinational loop to tools that
// ignore delays, which is intended. The loop structure follows the
// document's logic design; the sign conventions, the gain formula of the
// LUT, the halt handling of the loop and the lock register are this
// design's own choices.
`timescale 1ps/1ps
module dpll
  import dpll_pkg::*;
(
  input  logic   ref_clk,
  input  logic   reset,
  input  nmult_t n_mult,
  input  logic   halt,
  output logic   out_clk,
  output logic   lock,
  output logic   halted,
  output ctrl_t  ctrl_word
);
  logic   win, cap_en, upd_en, meas_valid, halted_s;
  logic   ebb, e, el;
  crr_t   crr;
  shift_t shift;
  ofs_t   shifted, offset;

  ref_timing u_timing (
    .ref_clk(ref_clk), .reset(reset), .halt(halt), .halted(halted),
    .win(win), .cap_en(cap_en), .upd_en(upd_en), .meas_valid(meas_valid),
    .halted_s(halted_s)
  );

  freq_detector u_fd (
    .out_clk(out_clk), .ref_clk(ref_clk), .reset(reset), .win(win),
    .cap_en(cap_en), .n_mult(n_mult), .crr(crr)
  );

  range_detector u_range (.crr(crr), .ebb(ebb));

  pdbb u_pdbb (.crr(crr), .e(e), .el(el));

  gain_lut u_lut (
    .clk(ref_clk), .rst(reset), .ctrl(ctrl_word), .n_mult(n_mult), .shift(shift)
  );

  offset_shifter u_shift (.crr(crr), .shift(shift), .offset(shifted));

  offset_mux u_mux (.shifted(shifted), .ebb(ebb), .e(e), .el(el), .offset(offset));

  control_accumulator u_acc (
    .clk(ref_clk), .rst(reset), .upd_en(upd_en & meas_valid), .offset(offset),
    .ctrl(ctrl_word)
  );

  always_ff @(posedge ref_clk) begin
    if (reset || halted_s) lock <= 1'b0;
    else if (upd_en)       lock <= ebb & meas_valid;
  end

  dco u_dco (.halt(halt), .ctrl(ctrl_word), .out_clk(out_clk), .halted(halted));
endmodule
