// tb_dco_coarse_delay: for every one of the 128 tap selects measures the
// edge delay and checks (127 - sel) * 144 ps + 3101 ps, i.e. that each step
// of the select removes one inverter pair.
`timescale 1ps/1ps
module tb_dco_coarse_delay;
  int checks = 0, failures = 0;
  logic a = 1'b1, y;
  logic [6:0] sel = '0;
  dco_coarse_delay dut (.a(a), .sel(sel), .y(y));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0, prev_d, d;
    prev_d = 0;
    for (int s = 0; s < 128; s++) begin
      sel = 7'(s);
      #30000;
      a = ~a;
      t0 = $time;
      @(y);
      d = $time - t0;
      checks++;
      if (d != time'((127 - s) * 144 + 3101)) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d delay=%0t", s, d);
      end
      if (s > 0) begin
        checks++;
        if (prev_d - d != 144) begin
          failures++;
          if (failures < 10) $display("FAIL step at sel=%0d", s);
        end
      end
      prev_d = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
