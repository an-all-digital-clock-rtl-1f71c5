// offset_shifter: multiplies the counter remainder by the power-of-two loop
// gain chosen by the gain LUT.
//
// offset = crr * 2^shift, with shift a signed exponent: left shift for a
// positive exponent, arithmetic right shift (rounding toward minus infinity)
// for a negative one. The result saturates to the signed OFS_W-bit range of
// the adder input. Combinational.
`timescale 1ps/1ps
module offset_shifter
  import dpll_pkg::*;
(
  input  crr_t   crr,
  input  shift_t shift,
  output ofs_t   offset
);
  localparam int unsigned WIDE = CNT_W + (1 << (SH_W - 1)) + 1;
  localparam logic signed [WIDE-1:0] OMAX = (WIDE'(1) <<< (OFS_W - 1)) - 1;
  localparam logic signed [WIDE-1:0] OMIN = -(WIDE'(1) <<< (OFS_W - 1));

  logic signed [WIDE-1:0] wide, scaled;
  logic [SH_W-1:0] mag;

  always_comb begin
    wide = WIDE'(crr);
    mag  = shift[SH_W-1] ? SH_W'(-shift) : SH_W'(shift);
    if (shift[SH_W-1]) scaled = wide >>> mag;
    else               scaled = wide <<< mag;
    if (scaled > OMAX)      offset = ofs_t'(OMAX);
    else if (scaled < OMIN) offset = ofs_t'(OMIN);
    else                    offset = ofs_t'(scaled);
  end
endmodule
