// control_accumulator: the loop filter, an accumulating adder with the
// control word register.
//
// On a rising ref_clk edge with upd_en high the control word becomes
// ctrl + offset, clamped to 0 .. 2^CW_W-1 so that a large correction cannot
// wrap the word around. It is a first-order digital filter (an integrator).
// Reset (synchronous to ref_clk, active high) loads RESET_VALUE, mid-range by
// default. The clamp and the reset value are choices of this design.
`timescale 1ps/1ps
module control_accumulator
  import dpll_pkg::*;
#(
  parameter ctrl_t RESET_VALUE = ctrl_t'(1) << (CW_W - 1)
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  upd_en,
  input  ofs_t  offset,
  output ctrl_t ctrl
);
  localparam int unsigned SW = CW_W + 2;
  logic signed [SW-1:0] sum;
  ctrl_t next;

  always_comb begin
    sum = $signed({2'b00, ctrl}) + SW'(offset);
    if (sum < 0)                          next = '0;
    else if (sum > $signed({2'b00, CTRL_MAX})) next = CTRL_MAX;
    else                                  next = ctrl_t'(sum);
  end

  always_ff @(posedge clk) begin
    if (rst)         ctrl <= RESET_VALUE;
    else if (upd_en) ctrl <= next;
  end
endmodule
