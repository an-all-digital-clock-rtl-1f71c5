// tb_offset_mux: checks the three-level offset selection for every select
// combination with random shifter values.
`timescale 1ps/1ps
module tb_offset_mux;
  import dpll_pkg::*;
  int checks = 0, failures = 0;
  ofs_t shifted, offset;
  logic ebb, e, el;
  offset_mux dut (.shifted(shifted), .ebb(ebb), .e(e), .el(el), .offset(offset));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int k = 0; k < 200; k++) begin
      for (int sel = 0; sel < 8; sel++) begin
        shifted = ofs_t'($urandom);
        {ebb, e, el} = 3'(sel);
        #1;
        if (!ebb)    exp_v = int'(shifted);
        else if (!e) exp_v = 0;
        else if (el) exp_v = -1;
        else         exp_v = 1;
        checks++;
        if (int'(offset) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%03b shifted=%0d got %0d exp %0d", sel, shifted, offset, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
