// gain_lut: chooses the power-of-two loop gain for frequency acquisition.
//
// With the DCO period T = 2 * L and L = (LOOP_STEPS_MAX - ctrl) fine steps,
// the control-word change that brings the counted cycles exactly to N is
//     delta_ctrl = CRR * (LOOP_STEPS_MAX - ctrl) / N,
// so the ideal gain depends on N and on the number of delay elements that
// are active now. The gain is approximated by 2^shift with
//     shift = floor(log2(LOOP_STEPS_MAX - ctrl) - log2(N)),
// which keeps it between about one half and one times the ideal value, so
// the loop converges without overshoot. log2 of the loop length comes from a
// 128-entry look-up table addressed by the coarse bits of the control word
// (filled at elaboration from LOOP_STEPS_MAX, using the centre of each
// coarse step); log2(N) comes from a leading-one detector. Both use the
// piecewise-linear approximation log2(2^p * (1 + f)) ~ p + f with three
// fraction bits. The exponent is registered on every rising ref_clk edge.
// LOOP_STEPS_MAX must match the DCO: it is its loop delay at control word 0
// divided by the fine step (25367 ps / 9 ps for the default DCO timing).
`timescale 1ps/1ps
module gain_lut
  import dpll_pkg::*;
#(
  parameter int unsigned LOOP_STEPS_MAX = 2819
) (
  input  logic   clk,
  input  logic   rst,
  input  ctrl_t  ctrl,
  input  nmult_t n_mult,
  output shift_t shift
);
  localparam int unsigned LW = 7;  // log2 value: 4 integer + 3 fraction bits
  localparam int unsigned XW = 12; // argument width of mlog2
  typedef logic [LW-1:0] lg_t;
  typedef lg_t lut_t [1 << COARSE_W];

  // Piecewise-linear log2 of a 12-bit value in 4.3 fixed point.
  function automatic lg_t mlog2(input logic [XW-1:0] x);
    logic [3:0] p;
    logic [XW-1:0] norm;
    p = '0;
    for (int i = 0; i < XW; i++)
      if (x[i]) p = 4'(i);
    norm = x << (4'(XW - 1) - p);
    return {p, norm[XW-2 -: 3]};
  endfunction

  function automatic lut_t build_lut();
    lut_t t;
    for (int c = 0; c < (1 << COARSE_W); c++)
      t[c] = mlog2(XW'(LOOP_STEPS_MAX - (c << FINE_W) - (1 << (FINE_W - 1))));
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  lg_t lg_len, lg_n;
  logic signed [LW:0] diff;

  always_comb begin
    lg_len = LUT[ctrl[CW_W-1 -: COARSE_W]];
    lg_n   = mlog2((n_mult == '0) ? XW'(1) : XW'(n_mult));
    diff   = $signed({1'b0, lg_len}) - $signed({1'b0, lg_n});
  end

  always_ff @(posedge clk) begin
    if (rst) shift <= '0;
    else     shift <= shift_t'(diff >>> 3);
  end
endmodule
