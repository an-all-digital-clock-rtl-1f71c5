// tb_range_detector: checks EBB against the window -8 .. +7 for every
// 13-bit remainder value.
`timescale 1ps/1ps
module tb_range_detector;
  import dpll_pkg::*;
  int checks = 0, failures = 0;
  crr_t crr;
  logic ebb;
  range_detector dut (.crr(crr), .ebb(ebb));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (CNT_W - 1)); v < (1 << (CNT_W - 1)); v++) begin
      crr = crr_t'(v);
      #1;
      checks++;
      if (ebb !== (v >= -8 && v <= 7)) begin
        failures++;
        if (failures < 10) $display("FAIL crr=%0d ebb=%0b", v, ebb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
