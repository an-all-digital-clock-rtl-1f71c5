// tb_control_accumulator: drives random offsets and update enables and
// compares the control word with a clamped integer model, cycle by cycle;
// also checks the reset value and that nothing changes without upd_en.
`timescale 1ps/1ps
module tb_control_accumulator;
  import dpll_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, upd_en = 1'b0;
  ofs_t offset = '0;
  ctrl_t ctrl;
  int model;
  int n_low = 0, n_high = 0;

  control_accumulator dut (.clk(clk), .rst(rst), .upd_en(upd_en), .offset(offset), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (int'(ctrl) != model) begin
      failures++;
      if (failures < 10) $display("FAIL %s ctrl=%0d model=%0d", what, ctrl, model);
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk);
    #1;
    model = 1024;
    check("reset");
    rst = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      upd_en = ($urandom_range(3) != 0);
      case ($urandom_range(3))
        0: offset = ofs_t'($urandom);                       // large steps
        1: offset = ofs_t'(int'($urandom_range(2)) - 1);     // bang-bang steps
        2: offset = (k % 400 < 200) ? ofs_t'(2047) : ofs_t'(-2048);
        default: offset = ofs_t'(int'($urandom_range(64)) - 32);
      endcase
      @(posedge clk);
      if (upd_en) begin
        model = model + int'(offset);
        if (model < 0)    begin model = 0;    n_low++;  end
        if (model > 2047) begin model = 2047; n_high++; end
      end
      #1;
      check("update");
    end
    checks++;
    if (n_low == 0 || n_high == 0) begin
      failures++;
      $display("FAIL clamp not exercised low=%0d high=%0d", n_low, n_high);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
