// tb_dpll_drift: robustness workload. After lock at N = 1000 (32 MHz from
// 32 kHz) the oscillator's loop delay is disturbed through the model's
// drift_ps variable, updated once per ref_clk period:
//   1. a slow sinusoid, 80 ps amplitude, 200 ref_clk periods;
//   2. white noise, uniform in +-20 ps;
//   3. a step of +1500 ps (about 10 % of the loop delay, as a slow corner or
//      a temperature change would give), then a step back.
// During 1 and 2 every ref_clk period must count N within the -8..+7 window,
// lock must stay high and the average over the phase must be N +- 1. After
// each step of 3 the loop must re-lock within 40 ref_clk periods and then
// average N +- 1.
`timescale 1ps/1ps
module tb_dpll_drift;
  import dpll_pkg::*;
  localparam longint T_REF = 31250000;  // ps
  localparam int N = 1000;
  int checks = 0, failures = 0;

  logic ref_clk = 1'b0, reset = 1'b1, halt = 1'b0;
  nmult_t n_mult = nmult_t'(N);
  logic out_clk, lock, halted;
  ctrl_t ctrl_word;

  dpll dut (.ref_clk(ref_clk), .reset(reset), .n_mult(n_mult), .halt(halt),
            .out_clk(out_clk), .lock(lock), .halted(halted), .ctrl_word(ctrl_word));

  always #(T_REF / 2) ref_clk = ~ref_clk;

  initial begin
    #(T_REF * 1500);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt_run = 0, cnt_last = 0;
  always @(posedge out_clk) cnt_run++;
  always @(posedge ref_clk) begin
    cnt_last = cnt_run;
    cnt_run = 0;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // one disturbed phase; mode 0 = sinusoid, 1 = white noise
  task automatic disturbed(int mode, int periods, string what);
    int sum = 0, worst = 0;
    real avg;
    for (int k = 0; k < periods; k++) begin
      if (mode == 0) dut.u_dco.drift_ps = int'($rtoi(80.0 * $sin(2.0 * 3.14159265 * real'(k) / 200.0)));
      else           dut.u_dco.drift_ps = int'($urandom_range(40)) - 20;
      @(posedge ref_clk);
      #1;
      if (k >= 2) begin
        sum += cnt_last;
        if ((cnt_last - N) > worst || (N - cnt_last) > worst)
          worst = (cnt_last > N) ? cnt_last - N : N - cnt_last;
        checks++;
        if (cnt_last - N > 8 || N - cnt_last > 7) fail($sformatf("%s: count %0d", what, cnt_last));
        checks++;
        if (!lock) fail($sformatf("%s: lock lost", what));
      end
    end
    avg = real'(sum) / real'(periods - 2);
    checks++;
    if (avg < N - 1.0 || avg > N + 1.0) fail($sformatf("%s: average %f", what, avg));
    $display("%s: average %f cycles per ref period, worst deviation %0d", what, avg, worst);
    dut.u_dco.drift_ps = 0;
  endtask

  task automatic step_to(int d, string what);
    int took = -1, sum = 0;
    real avg;
    dut.u_dco.drift_ps = d;
    for (int k = 0; k < 6 && lock; k++) @(posedge ref_clk);
    for (int k = 0; k < 40; k++) begin
      @(posedge ref_clk);
      if (lock) begin took = k + 1; break; end
    end
    checks++;
    if (took < 0) fail($sformatf("%s: no re-lock", what));
    repeat (40) @(posedge ref_clk);
    repeat (16) begin
      @(posedge ref_clk);
      #1;
      sum += cnt_last;
    end
    avg = real'(sum) / 16.0;
    checks++;
    if (avg < N - 1.0 || avg > N + 1.0) fail($sformatf("%s: average %f", what, avg));
    $display("%s: re-lock after %0d ref periods, ctrl=%0d, average %f", what, took, ctrl_word, avg);
  endtask

  initial begin
    repeat (3) @(posedge ref_clk);
    reset = 1'b0;
    repeat (80) @(posedge ref_clk);
    checks++;
    if (!lock) fail("no initial lock");
    disturbed(0, 400, "sinusoidal drift 80 ps");
    repeat (20) @(posedge ref_clk);
    disturbed(1, 300, "white noise +-20 ps");
    repeat (20) @(posedge ref_clk);
    step_to(1500, "step +1500 ps");
    step_to(0, "step back to 0 ps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
