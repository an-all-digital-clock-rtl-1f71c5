// tb_gain_lut: for random control words and harmonics, checks that the
// registered gain 2^shift lies between 0.45 and 1.1 times the ideal gain
// (2819 - ctrl) / N, evaluated at the centre of the coarse step, and that the
// exponent follows its inputs one clock later.
`timescale 1ps/1ps
module tb_gain_lut;
  import dpll_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  ctrl_t ctrl = '0;
  nmult_t n_mult = 12'd1;
  shift_t shift;

  gain_lut dut (.clk(clk), .rst(rst), .ctrl(ctrl), .n_mult(n_mult), .shift(shift));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ideal, ratio;
    shift_t prev;
    @(posedge clk); @(posedge clk);
    #1;
    checks++;
    if (shift !== '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      prev = shift;
      ctrl = ctrl_t'($urandom);
      if (k % 2 == 0) n_mult = nmult_t'($urandom_range(4095, 1));
      else            n_mult = nmult_t'($urandom_range(2300, 600));  // locking range
      #1;
      checks++;
      if (shift !== prev) begin
        failures++;
        if (failures < 10) $display("FAIL shift changed before the clock edge");
      end
      @(posedge clk);
      #1;
      ideal = real'(2819 - (int'(ctrl[10:4]) * 16 + 8)) / real'(n_mult);
      ratio = (2.0 ** real'(shift)) / ideal;
      checks++;
      if (ratio < 0.45 || ratio > 1.1) begin
        failures++;
        if (failures < 10) $display("FAIL ctrl=%0d n=%0d shift=%0d ratio=%f", ctrl, n_mult, shift, ratio);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
