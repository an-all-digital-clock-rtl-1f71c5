// tb_dco_fine_delay: for all 16 codes measures the edge delay of the fine
// line and checks 16 * 90 ps + (16 - code) * 9 ps: one code step is the
// 2-input / 3-input NAND difference of one stage.
`timescale 1ps/1ps
module tb_dco_fine_delay;
  int checks = 0, failures = 0;
  logic a = 1'b1, y;
  logic [3:0] code = '0;
  dco_fine_delay dut (.a(a), .code(code), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0, d;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 16; c++) begin
        code = 4'(c);
        #5000;
        a = ~a;
        t0 = $time;
        @(y);
        d = $time - t0;
        checks++;
        if (d != time'(16 * 90 + (16 - c) * 9)) begin
          failures++;
          $display("FAIL code=%0d delay=%0t", c, d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
