// tb_freq_detector: runs out_clk at 30 known periods (6 fixed, 24 random) against a 32 kHz
// ref_clk, generates ref_clk/2 and the capture enable as the sequencer does,
// and checks that the remainder register equals N minus the number of
// out_clk periods in one ref_clk period, within the one-cycle quantisation.
// Also checks that the register only changes on falling ref_clk edges with
// cap_en high.
`timescale 1ps/1ps
module tb_freq_detector;
  import dpll_pkg::*;
  localparam longint T_REF = 31250000;  // ps, 32 kHz
  int checks = 0, failures = 0;
  logic out_clk = 1'b0, ref_clk = 1'b0, reset = 1'b1, win = 1'b0;
  logic cap_en;
  nmult_t n_mult = 12'd1000;
  crr_t crr;
  int t_out = 31250;  // ps

  freq_detector dut (.out_clk(out_clk), .ref_clk(ref_clk), .reset(reset), .win(win),
                     .cap_en(cap_en), .n_mult(n_mult), .crr(crr));

  always #(T_REF / 2) ref_clk = ~ref_clk;
  always #(t_out / 2) out_clk = ~out_clk;
  always @(posedge ref_clk) if (!reset) win <= ~win;
  assign cap_en = ~win;

  initial begin
    #(T_REF * 200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the CRR may only move at a falling ref_clk edge with cap_en high
  crr_t last;
  always @(crr) begin
    if (!reset && !(ref_clk == 1'b0 && cap_en)) begin
      failures++;
      $display("FAIL crr changed at the wrong time");
    end
  end

  initial begin
    int periods[6] = '{31250, 15626, 40000, 13890, 50700, 31000};
    int ns[6]      = '{1000, 2000, 781, 2250, 616, 1010};
    real exact, err;
    repeat (2) @(posedge ref_clk);
    reset = 1'b0;
    for (int k = 0; k < 30; k++) begin
      int p, n;
      if (k < 6) begin
        p = periods[k];
        n = ns[k];
      end else begin
        p = int'($urandom_range(50700, 13890));
        n = int'($urandom_range(2300, 600));
      end
      t_out  = p;
      n_mult = nmult_t'(n);
      // let one full window pass with the new settings, then capture
      @(posedge ref_clk iff win == 1'b0);
      @(posedge ref_clk iff win == 1'b0);
      @(negedge ref_clk);
      #1;
      exact = real'(n) - real'(T_REF) / real'(p);
      err = real'(crr) - exact;
      checks++;
      if (err > 1.0 || err < -1.0) begin
        failures++;
        $display("FAIL T=%0d N=%0d crr=%0d exact=%f", p, n, crr, exact);
      end else if (k < 6)
        $display("T=%0d ps N=%0d crr=%0d (exact %f)", p, n, crr, exact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
