// tb_tab_link_rx: frames sent from an 8 x F_BC clock and received on a
// 12 x F_BC clock (both locked to the crossing, as in the system): every
// frame must arrive exactly once, unchanged, within 3-4 receiver clocks.
module tb_tab_link_rx;
  import l1cal_pkg::*;
  logic clk = 0, clk_tx = 0, rst_n = 0;
  link_frame_t link = '0;
  logic new_frame; out_mode_e kind; logic [ADF_CH-1:0][ET_W-1:0] word;
  int checks = 0, failures = 0;
  link_frame_t sent[$];

  tab_link_rx dut (.*);
  always #11 clk = ~clk;       // 12 clocks per 264-unit crossing
  always #16.5 clk_tx = ~clk_tx; // 8 clocks per crossing

  int txc = 0;
  always @(posedge clk_tx) if (rst_n) begin
    txc++;
    if (txc % 8 == 0) begin
      link_frame_t f;
      f.toggle = ~link.toggle;
      f.kind = out_mode_e'($urandom % 4);
      for (int c = 0; c < ADF_CH; c++) f.word[c] = 8'($urandom);
      link <= f;
      sent.push_back(f);
    end
  end

  int rxc = 0, last_change = 0;
  link_frame_t prev = '0;
  always @(posedge clk) begin
    rxc++;
    if (link != prev) begin last_change = rxc; prev = link; end
    if (rst_n && new_frame) begin
      link_frame_t e;
      checks++;
      e = sent.pop_front();
      if (word != e.word || kind != e.kind) begin failures++; $display("FAIL frame mismatch"); end
      if (rxc - last_change < 3 || rxc - last_change > 5) begin failures++; $display("FAIL delay %0d", rxc - last_change); end
    end
  end

  initial begin
    #50 rst_n = 1;
    repeat (12 * 100) @(posedge clk);
    checks++;
    if (sent.size() > 1) begin failures++; $display("FAIL %0d frames not received", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
