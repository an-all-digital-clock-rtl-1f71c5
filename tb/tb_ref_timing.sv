// tb_ref_timing: checks that ref_clk/2 toggles every ref_clk period, that
// capture and update fall in the low half, that an update happens exactly
// every two ref_clk periods, and that a halt (or halted) seen during an
// iteration makes that measurement invalid while later ones are valid again.
`timescale 1ps/1ps
module tb_ref_timing;
  int checks = 0, failures = 0;
  logic ref_clk = 1'b0, reset = 1'b1, halt = 1'b0, halted = 1'b0;
  logic win, cap_en, upd_en, meas_valid, halted_s;
  int cyc = 0, last_upd = -1, n_upd = 0, n_invalid = 0;

  ref_timing dut (.ref_clk(ref_clk), .reset(reset), .halt(halt), .halted(halted),
                  .win(win), .cap_en(cap_en), .upd_en(upd_en),
                  .meas_valid(meas_valid), .halted_s(halted_s));

  always #500 ref_clk = ~ref_clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic win_prev;
  always @(posedge ref_clk) begin
    if (!reset) begin
      cyc++;
      if (upd_en) begin
        checks++;
        if (last_upd >= 0 && cyc - last_upd != 2) begin
          failures++;
          $display("FAIL update spacing %0d", cyc - last_upd);
        end
        last_upd = cyc;
        n_upd++;
        if (!meas_valid) n_invalid++;
      end
      checks++;
      if (cap_en !== ~win || upd_en !== ~win) begin
        failures++;
        $display("FAIL enables");
      end
    end
    win_prev <= win;
  end

  always @(negedge ref_clk) begin
    if (!reset && cyc > 1) begin
      checks++;
      if (win === win_prev) begin
        failures++;
        $display("FAIL ref_clk/2 did not toggle");
      end
    end
  end

  initial begin
    int valid_after;
    repeat (3) @(posedge ref_clk);
    reset = 1'b0;
    repeat (12) @(posedge ref_clk);
    #1;
    checks++;
    if (!meas_valid) begin failures++; $display("FAIL not valid after reset"); end
    // a halt pulse in the middle of a window
    @(posedge ref_clk iff win == 1'b0);
    #100;
    halt = 1'b1;
    #200 halted = 1'b1;
    repeat (4) @(posedge ref_clk);
    #1;
    checks++;
    if (meas_valid || !halted_s) begin failures++; $display("FAIL valid during halt"); end
    halt = 1'b0;
    halted = 1'b0;
    // valid must come back within a few ref periods and stay
    valid_after = -1;
    for (int k = 0; k < 10; k++) begin
      @(posedge ref_clk);
      #1;
      if (meas_valid && valid_after < 0) valid_after = k;
    end
    checks++;
    if (valid_after < 0 || valid_after > 6) begin
      failures++;
      $display("FAIL valid did not return (%0d)", valid_after);
    end
    // the window during which halt was raised must not be used
    checks++;
    if (n_invalid == 0) begin failures++; $display("FAIL no invalid update seen"); end
    // a short halt of one out of two ref periods, starting right after an update
    @(posedge ref_clk iff win == 1'b1);
    #700 halt = 1'b1;
    #600 halt = 1'b0;
    begin
      int n_before = n_invalid;
      repeat (6) @(posedge ref_clk);
      checks++;
      if (n_invalid == n_before) begin failures++; $display("FAIL short halt not seen"); end
    end
    $display("updates=%0d invalid=%0d", n_upd, n_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
