// tb_offset_shifter: compares crr * 2^shift (floored for negative exponents,
// saturated to -2048 .. 2047) with integer arithmetic for all exponents and
// many remainders.
`timescale 1ps/1ps
module tb_offset_shifter;
  import dpll_pkg::*;
  int checks = 0, failures = 0;
  crr_t crr;
  shift_t shift;
  ofs_t offset;
  offset_shifter dut (.crr(crr), .shift(shift), .offset(offset));

  function automatic longint expected(longint c, int s);
    longint r;
    if (s >= 0) r = c * (longint'(1) << s);
    else begin
      longint d = longint'(1) << (-s);
      r = c / d;
      if ((c % d != 0) && (c < 0)) r = r - 1;  // floor
    end
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cv;
    for (int s = -16; s < 16; s++) begin
      for (int k = 0; k < 400; k++) begin
        if (k < 40) cv = k - 20;
        else        cv = int'($urandom_range(8191)) - 4096;
        crr = crr_t'(cv);
        shift = shift_t'(s);
        #1;
        checks++;
        if (longint'(offset) != expected(cv, s)) begin
          failures++;
          if (failures < 10) $display("FAIL crr=%0d s=%0d got %0d exp %0d", cv, s, offset, expected(cv, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
