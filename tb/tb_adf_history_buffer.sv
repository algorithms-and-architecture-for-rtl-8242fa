// tb_adf_history_buffer: writes more than a buffer's worth of words, reads
// back through both ports at random offsets, then freezes and checks that
// the contents stop changing while writes continue.
module tb_adf_history_buffer;
  import l1cal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we = 0, freeze = 0; logic [15:0] wdata = 0;
  logic [8:0] back_a = 0, back_b = 0; logic [15:0] rdata_a, rdata_b;
  int checks = 0, failures = 0;
  int written[$];

  adf_history_buffer #(.W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_reads(int n);
    for (int i = 0; i < n; i++) begin
      int ba, bb;
      ba = $urandom % 512; bb = $urandom % 512;
      @(negedge clk); back_a = 9'(ba); back_b = 9'(bb);
      @(negedge clk);
      checks += 2;
      if (int'(rdata_a) != written[written.size()-1-ba]) begin failures++; $display("FAIL A back %0d", ba); end
      if (int'(rdata_b) != written[written.size()-1-bb]) begin failures++; $display("FAIL B back %0d", bb); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 700; i++) begin
      @(negedge clk); we = 1; wdata = 16'($urandom); written.push_back(int'(wdata));
    end
    @(negedge clk); we = 0;
    check_reads(200);
    @(negedge clk); freeze = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); we = 1; wdata = 16'($urandom);
    end
    @(negedge clk); we = 0;
    check_reads(200);
    @(negedge clk); freeze = 0;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk); we = 1; wdata = 16'($urandom); written.push_back(int'(wdata));
    end
    @(negedge clk); we = 0;
    check_reads(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
