// tb_tab_global: random window results and tower maps; checks the object
// counts above each threshold, the scalar E_T sum, Ex/Ey (with weights from
// cos/sin of the phi-bin centres), the Cal-Track maps, the L2/L3 towers and
// the two-clock latency.
module tb_tab_global;
  import l1cal_pkg::*;
  import tb_ref_pkg::*;
  localparam int TID = 3;
  logic clk = 0, rst_n = 0, in_valid = 0;
  win_result_t [SW_CHIPS-1:0][15:0] res;
  logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0] em, hd;
  tab_cfg_t cfg;
  logic out_valid; tab_result_t result;
  logic [N_ETA-1:0][ADF_PHI-1:0] jet_map, em_map;
  logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0] l2_em, l2_hd;
  int checks = 0, failures = 0;

  tab_global #(.TAB_ID(TID)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    cfg = '0;
    for (int t = 0; t < N_THR; t++) begin
      cfg.jet_thr[t] = 12'(100 * t + 50); cfg.em_thr[t] = 12'(30 * t + 10); cfg.tau_thr[t] = 12'(80 * t + 20);
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 30; it++) begin
      int jc[4], ec[4], tc[4], s, x, y;
      @(negedge clk);
      for (int c = 0; c < SW_CHIPS; c++) for (int w = 0; w < 16; w++) begin
        res[c][w].jet = 1'($urandom % 4 == 0); res[c][w].jet_et = 12'($urandom % 500);
        res[c][w].tau = 1'($urandom % 3 == 0); res[c][w].em = 1'($urandom % 5 == 0);
        res[c][w].em_et = 12'($urandom % 150);
      end
      for (int e = 0; e < N_ETA; e++) for (int p = 0; p < 4; p++) begin
        em[e][p] = 8'($urandom); hd[e][p] = (it % 2) ? 8'($urandom) : 8'($urandom % 8);
      end
      for (int t = 0; t < 4; t++) begin
        jc[t] = 0; ec[t] = 0; tc[t] = 0;
        for (int c = 0; c < SW_CHIPS; c++) for (int w = 0; w < 16; w++) begin
          if (res[c][w].jet && res[c][w].jet_et > cfg.jet_thr[t]) jc[t]++;
          if (res[c][w].em && res[c][w].em_et > cfg.em_thr[t]) ec[t]++;
          if (res[c][w].tau && res[c][w].jet_et > cfg.tau_thr[t]) tc[t]++;
        end
      end
      s = 0; x = 0; y = 0;
      for (int p = 0; p < 4; p++) begin
        int col; col = 0;
        for (int e = 0; e < N_ETA; e++) col += int'(em[e][p]) + int'(hd[e][p]);
        s += col; x += col * cosw(4 * TID + p); y += col * sinw(4 * TID + p);
      end
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
      for (int t = 0; t < 4; t++) begin
        checks++;
        if (int'(result.jet_cnt[t]) != jc[t] || int'(result.em_cnt[t]) != ec[t] || int'(result.tau_cnt[t]) != tc[t]) begin
          failures++; $display("FAIL counts thr %0d: %0d/%0d %0d/%0d %0d/%0d", t, result.jet_cnt[t], jc[t], result.em_cnt[t], ec[t], result.tau_cnt[t], tc[t]);
        end
      end
      checks++;
      if (int'(result.sum_et) != s || int'(result.ex) != x || int'(result.ey) != y) begin
        failures++; $display("FAIL sums %0d/%0d %0d/%0d %0d/%0d", result.sum_et, s, result.ex, x, result.ey, y);
      end
      for (int c = 0; c < SW_CHIPS; c++) for (int w = 0; w < 16; w++) begin
        checks++;
        if (jet_map[4*c + w/4][w%4] != res[c][w].jet || em_map[4*c + w/4][w%4] != res[c][w].em) begin
          failures++; $display("FAIL map chip %0d win %0d", c, w);
        end
      end
      checks++;
      if (l2_em != em || l2_hd != hd) begin failures++; $display("FAIL L2/L3 towers"); end
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
