// tb_dpll_range: frequency-range workload. With a 32 kHz reference the core
// is reset and asked for harmonics across the oscillator's range, from
// N = 616 (19.7 MHz) to N = 2250 (72 MHz). For each one it requires lock
// within 60 ref_clk periods of reset and an average of N +- 1 out_clk cycles
// per ref_clk period afterwards, and prints the acquisition time. A last
// request, N = 594 (19.0 MHz), lies below the slowest setting of the default
// oscillator (19.7 MHz, 616 cycles): the control word must rest at 0 with
// lock low, since the remainder (-22) stays outside the -8..+7 window.
`timescale 1ps/1ps
module tb_dpll_range;
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
    #(T_REF * 1200);
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

  initial begin
    int ns[7] = '{616, 700, 1000, 1250, 1500, 2000, 2250};
    int took, sum;
    real avg;
    foreach (ns[i]) begin
      reset = 1'b1;
      n_mult = nmult_t'(ns[i]);
      repeat (3) @(posedge ref_clk);
      reset = 1'b0;
      took = -1;
      for (int k = 0; k < 60; k++) begin
        @(posedge ref_clk);
        if (lock) begin took = k + 1; break; end
      end
      checks++;
      if (took < 0) begin
        failures++;
        $display("FAIL N=%0d: no lock", ns[i]);
      end
      repeat (60) @(posedge ref_clk);
      sum = 0;
      repeat (16) begin
        @(posedge ref_clk);
        #1;
        sum += cnt_last;
      end
      avg = real'(sum) / 16.0;
      checks++;
      if (avg < real'(ns[i]) - 1.0 || avg > real'(ns[i]) + 1.0 || !lock) begin
        failures++;
        $display("FAIL N=%0d: %f cycles per ref period, lock=%0b", ns[i], avg, lock);
      end else
        $display("N=%0d (%0d kHz): lock after %0d ref periods, ctrl=%0d, %f cycles per ref period",
                 ns[i], ns[i] * 32, took, ctrl_word, avg);
    end
    // below the range
    reset = 1'b1;
    n_mult = 12'd594;
    repeat (3) @(posedge ref_clk);
    reset = 1'b0;
    repeat (80) @(posedge ref_clk);
    checks++;
    if (ctrl_word != '0 || lock) begin
      failures++;
      $display("FAIL N=594: ctrl=%0d lock=%0b", ctrl_word, lock);
    end else
      $display("N=594 (19.0 MHz) is out of range: control word at 0, %0d cycles per ref period", cnt_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
