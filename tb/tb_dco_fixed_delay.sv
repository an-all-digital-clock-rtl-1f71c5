// tb_dco_fixed_delay: measures the delay of rising and falling edges through
// the fixed line (32 inverters of 72 ps), also for edges that follow each
// other closely (one edge in the line at a time, as in the ring).
`timescale 1ps/1ps
module tb_dco_fixed_delay;
  int checks = 0, failures = 0;
  logic a = 1'b1, y;
  dco_fixed_delay dut (.a(a), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic edge_delay(input logic v);
    time t0;
    #10000;
    a = v;
    t0 = $time;
    @(y);
    checks++;
    if ($time - t0 != 32 * 72 || y !== v) begin
      failures++;
      $display("FAIL delay %0t", $time - t0);
    end
  endtask

  initial begin
    time t_rise, t_fall;
    for (int k = 0; k < 4; k++) begin
      edge_delay(1'b0);
      edge_delay(1'b1);
    end
    // a low pulse just longer than the line
    #10000;
    a = 1'b0;
    t_fall = $time;
    @(negedge y);
    checks++;
    if ($time - t_fall != 2304) begin failures++; $display("FAIL pulse fall"); end
    #96 a = 1'b1;
    t_rise = $time;
    @(posedge y);
    checks++;
    if ($time - t_rise != 2304) begin failures++; $display("FAIL pulse rise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
