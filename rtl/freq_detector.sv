// freq_detector: the out_clk cycle counter and the counter remainder
// register (CRR), the frequency discriminator of the loop.
//
// The counter runs on out_clk. The counting window is ref_clk/2 (high for
// one full ref_clk period), brought into the out_clk domain by two flip-flops.
// On the first out_clk edge of a window the counter loads N-1 (that edge
// already counts) and then counts down on every edge while the window lasts,
// so after the window it holds N minus the number of out_clk cycles in one
// ref_clk period, in two's complement. It then holds until the next window.
// The CRR samples the counter on a falling ref_clk edge with cap_en high, in
// the middle of the low half of ref_clk/2, when the counter has long been
// stable. Gating out_clk with ref_clk/2 is replaced here by a synchronised
// enable, which counts the same edges up to the one-cycle quantisation the
// counter has anyway. reset is asynchronous and active high.
`timescale 1ps/1ps
module freq_detector
  import dpll_pkg::*;
(
  input  logic   out_clk,
  input  logic   ref_clk,
  input  logic   reset,
  input  logic   win,      // ref_clk/2
  input  logic   cap_en,   // CRR capture enable, sampled on negedge ref_clk
  input  nmult_t n_mult,
  output crr_t   crr
);
  logic win_m, win_s, win_d;
  crr_t cnt;

  always_ff @(posedge out_clk or posedge reset) begin
    if (reset) begin
      win_m <= 1'b0;
      win_s <= 1'b0;
      win_d <= 1'b0;
      cnt   <= '0;
    end else begin
      win_m <= win;
      win_s <= win_m;
      win_d <= win_s;
      if (win_s && !win_d) cnt <= crr_t'(n_mult) - crr_t'(1);
      else if (win_s)      cnt <= cnt - crr_t'(1);
    end
  end

  always_ff @(negedge ref_clk or posedge reset) begin
    if (reset)       crr <= '0;
    else if (cap_en) crr <= cnt;
  end
endmodule
