// tb_adf_et_lut: fills the whole 1024-entry table with a pseudo-random
// calibration and reads every address back through the lookup port.
module tb_adf_et_lut;
  import l1cal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we = 0; logic [LUT_AW-1:0] waddr = 0, addr = 0; logic [ET_W-1:0] wdata = 0;
  logic a_valid = 0, et_valid; logic [ET_W-1:0] et;
  logic [ET_W-1:0] model [1024];
  int checks = 0, failures = 0;

  adf_et_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = LUT_AW'(i); wdata = ET_W'((i * 37 + 11) ^ (i >> 3)); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1024; i++) begin
      int a; a = (i * 389) % 1024;
      @(negedge clk); a_valid = 1; addr = LUT_AW'(a);
      @(negedge clk); a_valid = 0;
      checks++;
      if (!et_valid || et !== model[a]) begin
        failures++; $display("FAIL addr %0d et %0d exp %0d", a, et, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
