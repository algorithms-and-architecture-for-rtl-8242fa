// tb_adf_bc_decimator: random peak values, both phases, all shifts; checks
// that only the selected result of each pair is kept and the scaled value is
// saturated to 10 bits.
module tb_adf_bc_decimator;
  import l1cal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic p_valid = 0, p_pair = 0; logic [FIR_W-1:0] p = 0;
  logic dec_phase = 0; logic [3:0] scale_shift = 0;
  logic a_valid; logic [LUT_AW-1:0] addr;
  int checks = 0, failures = 0, nsat = 0;

  adf_bc_decimator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int v, e; bit keep;
      @(negedge clk);
      dec_phase = 1'($urandom); scale_shift = 4'($urandom);
      v = $urandom % 65536; p = FIR_W'(v); p_pair = 1'($urandom); p_valid = 1;
      keep = (p_pair == dec_phase);
      e = v >> scale_shift; if (e > 1023) begin e = 1023; nsat++; end
      @(negedge clk); p_valid = 0;
      checks++;
      if (a_valid !== keep || (keep && int'(addr) != e)) begin
        failures++; $display("FAIL v=%0d sh=%0d keep=%b a_valid=%b addr=%0d exp=%0d", v, scale_shift, keep, a_valid, addr, e);
      end
    end
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
