// tb_gab: random results from eight TABs and random trigger definitions
// over all sources; checks the merged scalar E_T, the missing E_T squared
// and every one of the 64 decisions, and the two-clock latency.
module tb_gab;
  import l1cal_pkg::*;
  logic clk = 0, rst_n = 0, tab_valid = 0;
  tab_result_t [N_TAB-1:0] tab_res;
  trig_def_t [N_TRIG-1:0] trig_def;
  logic trig_valid; logic [N_TRIG-1:0] trig;
  logic [SUM_W+2:0] sum_et; logic [2*(EXY_W-4)-1:0] met_sq;
  int checks = 0, failures = 0, nfired = 0;

  gab dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int cnt[12]; longint s, x, y, mx, my, m2;
      @(negedge clk);
      for (int k = 0; k < 12; k++) cnt[k] = 0;
      s = 0; x = 0; y = 0;
      for (int t = 0; t < N_TAB; t++) begin
        for (int k = 0; k < 4; k++) begin
          tab_res[t].jet_cnt[k] = 8'($urandom % 6); tab_res[t].em_cnt[k] = 8'($urandom % 4);
          tab_res[t].tau_cnt[k] = 8'($urandom % 3);
          cnt[k] += int'(tab_res[t].jet_cnt[k]); cnt[4+k] += int'(tab_res[t].em_cnt[k]); cnt[8+k] += int'(tab_res[t].tau_cnt[k]);
        end
        tab_res[t].sum_et = 16'($urandom % 20000);
        tab_res[t].ex = EXY_W'(int'($urandom % 4000000) - 2000000);
        tab_res[t].ey = EXY_W'(int'($urandom % 4000000) - 2000000);
        s += tab_res[t].sum_et; x += tab_res[t].ex; y += tab_res[t].ey;
      end
      mx = x >>> 7; my = y >>> 7; m2 = mx * mx + my * my;
      for (int i = 0; i < N_TRIG; i++) begin
        trig_def[i].en = 1'($urandom % 8 != 0);
        trig_def[i].src = 4'($urandom % 15);
        case (trig_def[i].src)
          12: trig_def[i].thr = 16'(s + int'($urandom % 4000) - 2000);
          13: begin int r, d; r = int'($sqrt(real'(m2))); d = int'($urandom % 200); trig_def[i].thr = 16'(r + d - 100); end
          default: trig_def[i].thr = 16'($urandom % 30);
        endcase
      end
      tab_valid = 1;
      @(negedge clk); tab_valid = 0;
      @(negedge clk);
      checks += 2;
      if (!trig_valid) begin failures++; $display("FAIL latency"); end
      if (longint'(sum_et) != s || longint'(met_sq) != m2) begin failures++; $display("FAIL sums %0d/%0d %0d/%0d", sum_et, s, met_sq, m2); end
      for (int i = 0; i < N_TRIG; i++) begin
        bit e; int src; src = int'(trig_def[i].src);
        if (src < 12) e = cnt[src] >= int'(trig_def[i].thr);
        else if (src == 12) e = s >= longint'(trig_def[i].thr);
        else if (src == 13) e = m2 >= longint'(trig_def[i].thr) * longint'(trig_def[i].thr);
        else e = 0;
        e = e && trig_def[i].en;
        nfired += e;
        checks++;
        if (trig[i] != e) begin failures++; $display("FAIL trig %0d src %0d", i, src); end
      end
    end
    checks++;
    if (nfired < 100) begin failures++; $display("FAIL few triggers fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
