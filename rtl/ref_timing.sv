// ref_timing: the ref_clk/2 divider and the two-period update sequence.
//
// ph toggles on every rising ref_clk edge and is ref_clk/2, the counting
// window. One loop iteration takes two ref_clk periods:
//   ph = 1            out_clk cycles are counted;
//   ph = 0, falling   cap_en: the CRR takes the count (mid low phase);
//   ph 0 -> 1, rising upd_en: the control word takes its new value, and the
//                     next window starts with it.
// meas_valid says whether the count about to be used is trustworthy: it is
// cleared by reset and whenever halt or halted (brought in by two
// flip-flops) was seen since the start of the window; after reset or idle
// the next window that starts with the oscillator running is valid again. halted_s is the synchronised
// halted flag. Reset is synchronous to ref_clk, active high.
`timescale 1ps/1ps
module ref_timing (
  input  logic ref_clk,
  input  logic reset,
  input  logic halt,
  input  logic halted,
  output logic win,
  output logic cap_en,
  output logic upd_en,
  output logic meas_valid,
  output logic halted_s
);
  logic idle_m, idle_s;
  logic ok;      // no idle seen since the current window started

  always_ff @(posedge ref_clk) begin
    if (reset) begin
      win    <= 1'b0;
      idle_m <= 1'b1;
      idle_s <= 1'b1;
      ok     <= 1'b0;
    end else begin
      idle_m <= halt | halted;
      idle_s <= idle_m;
      win    <= ~win;
      if (idle_m | idle_s) ok <= 1'b0;  // oscillator idle: drop this iteration
      else if (!win) ok <= 1'b1;  // a window starts with the oscillator running
    end
  end

  assign cap_en     = ~win;
  assign upd_en     = ~win;
  assign meas_valid = ok & ~idle_m & ~idle_s;
  assign halted_s   = idle_s;
endmodule
