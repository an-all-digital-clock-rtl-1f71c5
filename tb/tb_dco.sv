// tb_dco: measures the oscillator period for control words across the range
// and checks it against 2 * L(ctrl), L = 25367 ps - 9 ps * ctrl; checks
// that halt stops the ring after a last rising edge with out_clk left high and
// halted set, that no edge follows, and that dropping halt restarts it at
// the same period.
`timescale 1ps/1ps
module tb_dco;
  import dpll_pkg::*;
  int checks = 0, failures = 0;
  logic halt = 1'b0;
  ctrl_t ctrl = '0;
  logic out_clk, halted;
  dco dut (.halt(halt), .ctrl(ctrl), .out_clk(out_clk), .halted(halted));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int period_of(int c);
    return 2 * (25367 - 9 * c);
  endfunction

  task automatic measure(int c);
    time t1, t2;
    ctrl = ctrl_t'(c);
    repeat (3) @(posedge out_clk);   // let the new setting fill the ring
    @(posedge out_clk) t1 = $time;
    @(posedge out_clk) t2 = $time;
    checks++;
    if (int'(t2 - t1) != period_of(c)) begin
      failures++;
      $display("FAIL ctrl=%0d period=%0t expected %0d", c, t2 - t1, period_of(c));
    end
  endtask

  int edges_in_halt;
  always @(out_clk) if (halted && halt) edges_in_halt++;

  initial begin
    int list[8] = '{0, 1, 15, 16, 1024, 1082, 2046, 2047};
    time t_h, t_r;
    foreach (list[i]) measure(list[i]);
    for (int k = 0; k < 20; k++) measure(int'($urandom_range(2047)));
    $display("max freq %0d kHz, min freq %0d kHz", 1000000000 / period_of(2047), 1000000000 / period_of(0));
    // halt
    ctrl = 11'd1024;
    repeat (3) @(posedge out_clk);
    @(negedge out_clk);
    halt = 1'b1;
    @(posedge halted);
    @(posedge out_clk);   // the last high phase still leaves the line
    #1;
    edges_in_halt = 0;
    #200000;
    checks++;
    if (edges_in_halt != 0 || out_clk !== 1'b1) begin
      failures++;
      $display("FAIL ring did not stop cleanly (%0d edges, out_clk=%0b)", edges_in_halt, out_clk);
    end
    // wake up: first falling edge comes within one loop delay
    halt = 1'b0;
    t_h = $time;
    #1;
    checks++;
    if (halted !== 1'b0) begin failures++; $display("FAIL halted not cleared"); end
    @(negedge out_clk) t_r = $time;
    checks++;
    if (int'(t_r - t_h) > period_of(1024) / 2) begin
      failures++;
      $display("FAIL slow restart %0t", t_r - t_h);
    end
    measure(1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
