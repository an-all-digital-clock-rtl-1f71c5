// tb_dpll: end-to-end test of the clock generator at its default sizes,
// with a 32 kHz reference clock.
//
// Sequence: power-on reset and acquisition of N = 1000 (32 MHz); a change of
// harmonic to 2000 (64 MHz); halt and wake-up; a harmonic above the
// oscillator's range (2400) that drives the control word into its clamp;
// return to N = 700. After each acquisition the test counts out_clk cycles
// over 16 ref_clk periods and requires the average to be N within one
// cycle, and it bounds the acquisition time in ref_clk periods. It checks
// that the control word only moves every two ref_clk periods, that halted
// follows halt within one out_clk period, that no out_clk edge appears while
// halted, that the first 50 out_clk periods after wake-up are within 0.5 %
// of the target period, and that the first ref_clk period after wake-up
// counts N within a few cycles. Every loop mechanism (coarse LUT step, bang-bang +1,
// -1 and 0, lock, halt, skipped measurement, clamp, harmonic change) must
// occur at least once.
`timescale 1ps/1ps
module tb_dpll;
  import dpll_pkg::*;
  localparam longint T_REF = 31250000;  // ps
  int checks = 0, failures = 0;

  logic ref_clk = 1'b0, reset = 1'b1, halt = 1'b0;
  nmult_t n_mult = 12'd1000;
  logic out_clk, lock, halted;
  ctrl_t ctrl_word;

  dpll dut (.ref_clk(ref_clk), .reset(reset), .n_mult(n_mult), .halt(halt),
            .out_clk(out_clk), .lock(lock), .halted(halted), .ctrl_word(ctrl_word));

  always #(T_REF / 2) ref_clk = ~ref_clk;

  initial begin
    #(T_REF * 600);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ---- out_clk cycles per ref_clk period -------------------------------
  int cnt_run = 0, cnt_last = 0, edges_halted = 0;
  always @(posedge out_clk) begin
    cnt_run++;
    if (halted) edges_halted++;
  end
  int ref_cyc = 0;
  always @(posedge ref_clk) begin
    cnt_last = cnt_run;
    cnt_run = 0;
    ref_cyc++;
  end

  // ---- mechanism counters, sampled at each control update --------------
  int n_coarse = 0, n_bb_up = 0, n_bb_down = 0, n_bb_zero = 0, n_skip = 0;
  int n_clamp = 0, n_lock_rise = 0, n_halt = 0, n_harm = 0;
  int last_change = -1;
  ctrl_t ctrl_prev;
  logic lock_prev = 1'b0;
  always @(posedge ref_clk) begin
    if (!reset && dut.upd_en) begin
      if (!dut.meas_valid) n_skip++;
      else if (!dut.ebb) n_coarse++;
      else if (!dut.e) n_bb_zero++;
      else if (dut.el) n_bb_down++;
      else n_bb_up++;
      if (dut.meas_valid && !dut.ebb &&
          ((int'(ctrl_word) + int'(dut.offset) > 2047) || (int'(ctrl_word) + int'(dut.offset) < 0)))
        n_clamp++;
    end
    lock_prev <= lock;
    if (lock && !lock_prev) n_lock_rise++;
  end
  // the control word may change only every second ref_clk period
  always @(ctrl_word) begin
    if (!reset) begin
      checks++;
      if (last_change >= 0 && ((ref_cyc - last_change) % 2) != 0)
        fail($sformatf("control word moved after %0d ref periods", ref_cyc - last_change));
      last_change = ref_cyc;
    end
  end

  // ---- helpers ---------------------------------------------------------
  task automatic wait_lock(int max_ref, string what, output int took);
    took = -1;
    for (int k = 0; k < max_ref; k++) begin
      @(posedge ref_clk);
      if (lock) begin took = k + 1; break; end
    end
    checks++;
    if (took < 0) fail($sformatf("%s: no lock within %0d ref periods", what, max_ref));
    else $display("%s: lock after %0d ref periods, ctrl=%0d", what, took, ctrl_word);
  endtask

  task automatic wait_unlock(string what);
    int k;
    for (k = 0; k < 8 && lock; k++) @(posedge ref_clk);
    checks++;
    if (lock) fail($sformatf("%s: lock did not drop", what));
  endtask

  task automatic check_freq(int n, string what);
    int sum = 0;
    real avg;
    repeat (16) begin
      @(posedge ref_clk);
      #1;
      sum += cnt_last;
    end
    avg = real'(sum) / 16.0;
    checks++;
    if (avg < real'(n) - 1.0 || avg > real'(n) + 1.0)
      fail($sformatf("%s: %f out_clk cycles per ref period, expected %0d", what, avg, n));
    else
      $display("%s: %f out_clk cycles per ref period (N=%0d)", what, avg, n);
    checks++;
    if (!lock) fail($sformatf("%s: lock lost", what));
  endtask

  initial begin
    int took;
    time t_h;
    repeat (3) @(posedge ref_clk);
    reset = 1'b0;

    // 1. power-on acquisition
    wait_lock(60, "power-on N=1000", took);
    repeat (40) @(posedge ref_clk);   // bang-bang tracking settles
    check_freq(1000, "N=1000");

    // 2. new harmonic
    n_mult = 12'd2000;
    n_harm++;
    wait_unlock("harmonic change to 2000");
    wait_lock(60, "harmonic change to 2000", took);
    repeat (40) @(posedge ref_clk);
    check_freq(2000, "N=2000");

    // 3. halt and wake-up
    @(posedge ref_clk);
    #(T_REF / 3);
    halt = 1'b1;
    t_h = $time;
    @(posedge halted);
    n_halt++;
    checks++;
    if ($time - t_h > 2 * (2 * 25367)) fail("halted too late");
    repeat (10) @(posedge ref_clk);
    checks++;
    if (lock) fail("lock still high while halted");
    edges_halted = 0;
    repeat (4) @(posedge ref_clk);
    checks++;
    if (edges_halted != 0) fail($sformatf("%0d out_clk edges while halted", edges_halted));
    halt = 1'b0;
    // the first 50 out_clk periods after wake-up are already within 0.5 % of
    // T_ref / N: the control word was kept through the halt
    begin
      time t_prev, t_now;
      int bad = 0;
      real target = real'(T_REF) / 2000.0;
      @(posedge out_clk) t_prev = $time;
      repeat (50) begin
        @(posedge out_clk) t_now = $time;
        if (real'(t_now - t_prev) > target * 1.005 || real'(t_now - t_prev) < target * 0.995) bad++;
        t_prev = t_now;
      end
      checks++;
      if (bad != 0) fail($sformatf("%0d of the first 50 periods after wake-up off target", bad));
      else $display("first 50 out_clk periods after wake-up within 0.5 %% of target");
    end
    @(posedge ref_clk);
    @(posedge ref_clk);
    #1;
    checks++;
    if (cnt_last < 2000 - 4 || cnt_last > 2000 + 4)
      fail($sformatf("first period after wake-up counts %0d", cnt_last));
    else
      $display("first ref period after wake-up: %0d out_clk cycles", cnt_last);
    wait_lock(12, "wake-up", took);
    check_freq(2000, "after wake-up");

    // 4. harmonic above the range: the control word saturates
    n_mult = 12'd2400;
    n_harm++;
    repeat (30) @(posedge ref_clk);
    checks++;
    if (ctrl_word != 11'h7ff) fail($sformatf("control word %0d, expected clamp at 2047", ctrl_word));

    // 5. back down to a low harmonic
    n_mult = 12'd700;
    n_harm++;
    wait_unlock("harmonic change to 700");
    wait_lock(60, "harmonic change to 700", took);
    repeat (40) @(posedge ref_clk);
    check_freq(700, "N=700");

    $display("mechanisms: coarse=%0d bb_up=%0d bb_down=%0d bb_zero=%0d skipped=%0d clamp=%0d lock_rise=%0d halt=%0d harmonic_change=%0d",
             n_coarse, n_bb_up, n_bb_down, n_bb_zero, n_skip, n_clamp, n_lock_rise, n_halt, n_harm);
    checks++; if (n_coarse == 0)    fail("no coarse LUT update");
    checks++; if (n_bb_up == 0)     fail("no bang-bang +1");
    checks++; if (n_bb_down == 0)   fail("no bang-bang -1");
    checks++; if (n_bb_zero == 0)   fail("no bang-bang 0");
    checks++; if (n_skip == 0)      fail("no skipped measurement");
    checks++; if (n_clamp == 0)     fail("no clamp");
    checks++; if (n_lock_rise < 4)  fail("too few lock events");
    checks++; if (n_halt == 0)      fail("no halt");
    checks++; if (n_harm == 0)      fail("no harmonic change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
