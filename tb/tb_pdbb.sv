// tb_pdbb: checks the bang-bang selects for every remainder value: no error
// at zero, "early" (step -1) for negative, "late" (step +1) for positive.
`timescale 1ps/1ps
module tb_pdbb;
  import dpll_pkg::*;
  int checks = 0, failures = 0;
  crr_t crr;
  logic e, el;
  pdbb dut (.crr(crr), .e(e), .el(el));

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
      if (e !== (v != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL e crr=%0d", v);
      end
      if (v != 0) begin
        checks++;
        if (el !== (v < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL el crr=%0d", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
