// tb_adf_peak_detector: random and hand-made sequences (plateaus, negative
// peaks, a clean peak) against the rule "middle strictly above both
// neighbours, else zero".
module tb_adf_peak_detector;
  import l1cal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic y_valid = 0, y_pair = 0; logic signed [FIR_W-1:0] y = 0;
  logic p_valid, p_pair; logic [FIR_W-1:0] p;
  int checks = 0, failures = 0, npeaks = 0;
  int seq[$]; int pairs[$];
  int expq[$], exppair[$];

  adf_peak_detector dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && p_valid) begin
    int e, ep;
    checks++;
    e = expq.pop_front(); ep = exppair.pop_front();
    if (int'(p) != e || int'(p_pair) != ep) begin
      failures++; $display("FAIL p=%0d exp=%0d pair %0d/%0d", p, e, p_pair, ep);
    end
  end

  task automatic send(int v, bit pr);
    int n, mid, old, e;
    seq.push_back(v); pairs.push_back(pr);
    n = seq.size();
    mid = (n >= 2) ? seq[n-2] : 0;
    old = (n >= 3) ? seq[n-3] : 0;
    e = (mid > v && mid > old && mid > 0) ? mid : 0;
    if (e != 0) npeaks++;
    expq.push_back(e); exppair.push_back((n >= 2) ? pairs[n-2] : 0);
    @(negedge clk); y_valid = 1; y = FIR_W'(v); y_pair = pr;
    @(negedge clk); y_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    send(0,0); send(10,1); send(50,0); send(120,1); send(80,0); send(30,1);
    send(30,0); send(30,1); send(40,0); send(40,1); send(10,0); send(-5,1);
    send(-50,0); send(-20,1); send(-60,0); send(0,1);
    for (int i = 0; i < 300; i++) send(int'($urandom % 2000) - 500, 1'(i));
    repeat (5) @(posedge clk);
    if (npeaks < 10) begin failures++; $display("FAIL too few peaks exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
