// tb_adf_fir: random samples and coefficients against a reference
// convolution, including saturation at both ends and the two-clock latency.
module tb_adf_fir;
  import l1cal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic x_valid = 0, x_pair = 0; logic [ADC_W-1:0] x = 0;
  logic signed [FIR_TAPS-1:0][COEF_W-1:0] coef = '0;
  logic y_valid, y_pair; logic signed [FIR_W-1:0] y;
  int checks = 0, failures = 0;
  int hist[$];
  int sent_cyc[$];
  int cyc = 0;

  adf_fir dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_y();
    longint acc = 0;
    for (int k = 0; k < FIR_TAPS; k++)
      if (hist.size() > k) acc += longint'(hist[hist.size()-1-k]) * longint'($signed(coef[k]));
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  int expq[$]; int exppair[$];
  always @(posedge clk) if (rst_n && y_valid) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      int e, ep, sc;
      e = expq.pop_front(); ep = exppair.pop_front(); sc = sent_cyc.pop_front();
      if (int'(y) != e || int'(y_pair) != ep || cyc - sc != 2) begin
        failures++; $display("FAIL y=%0d exp=%0d pair %0d/%0d lat %0d", y, e, y_pair, ep, cyc - sc);
      end
    end
  end

  task automatic send(int v, bit pr);
    @(negedge clk); x_valid = 1; x = ADC_W'(v); x_pair = pr;
    hist.push_back(v); expq.push_back(ref_y()); exppair.push_back(pr); sent_cyc.push_back(cyc);
    @(negedge clk); x_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < FIR_TAPS; k++) coef[k] = COEF_W'($urandom);
      for (int i = 0; i < 12; i++) send($urandom % 1024, 1'(i));
    end
    // saturation high and low
    for (int k = 0; k < FIR_TAPS; k++) coef[k] = 6'sd31;
    for (int i = 0; i < 10; i++) send(1023, 1'(i));
    for (int k = 0; k < FIR_TAPS; k++) coef[k] = -6'sd32;
    for (int i = 0; i < 10; i++) send(1023, 1'(i));
    repeat (10) @(posedge clk);
    if (expq.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
