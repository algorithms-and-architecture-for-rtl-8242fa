// tb_tab: one TAB (board 0, so the phi wrap-around is exercised) fed by 30
// ADF links on their own clock (8 per crossing against the TAB's 12).
// Random tower maps, one per crossing, are sent; every output of the board
// (jet and EM position maps, object counts per threshold, scalar E_T, Ex, Ey,
// L2/L3 towers) is compared with the software reference on the full map.
// Some frames are sent as test data (constant mode), which the board must
// treat as zero.  The latency in crossings is found on the first result and
// must stay constant.
module tb_tab;
  import l1cal_pkg::*;
  import tb_ref_pkg::*;
  localparam int TID = 0;
  localparam int NBC = 24;
  logic clk = 0, clk_adf = 0, rst_n = 0, bc_sync;
  link_frame_t [TAB_LINKS-1:0] link = '0;
  tab_cfg_t cfg;
  logic out_valid; tab_result_t result;
  logic [N_ETA-1:0][ADF_PHI-1:0] jet_map, em_map;
  logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0] l2_em, l2_hd;
  int checks = 0, failures = 0, nmasked = 0, njet = 0, nem = 0;

  tab #(.TAB_ID(TID)) dut (.*);
  always #22 clk = ~clk;          // 12 x F_BC
  always #33 clk_adf = ~clk_adf;  // 8 x F_BC

  tmap_t gem [NBC+8], ghd [NBC+8];
  bit masked [NBC+8];
  int tc = 0;
  always @(posedge clk) tc <= tc + 1;
  assign bc_sync = (tc % 12 == 0);

  // ---------------------------------------------------------- stimulus
  initial begin
    for (int n = 0; n < NBC + 8; n++) begin
      masked[n] = (n % 7 == 5);
      for (int e = 0; e < 40; e++) for (int p = 0; p < 32; p++) begin
        int r; r = $urandom % 100;
        gem[n][e][p] = (n >= NBC) ? 0 : (r < 70) ? 0 : (r < 90) ? $urandom % 4 : $urandom % 256;
        ghd[n][e][p] = (n >= NBC) ? 0 : (r < 80) ? 0 : $urandom % 64;
      end
    end
  end

  int nsent = 0, ac = 0;
  always @(posedge clk_adf) if (rst_n) begin
    ac++;
    if (ac % 8 == 0 && nsent < NBC + 8) begin
      for (int e = 0; e < N_ADF_ETA; e++) for (int m = 0; m < 3; m++) begin
        link_frame_t f; int p;
        p = (TID - 1 + m + 8) % 8;
        f.toggle = ~link[3*e+m].toggle;
        f.kind = OUT_FILTERED;
        for (int t = 0; t < 16; t++) begin
          f.word[t]      = 8'(gem[nsent][4*e + t/4][4*p + t%4]);
          f.word[16 + t] = 8'(ghd[nsent][4*e + t/4][4*p + t%4]);
        end
        if (masked[nsent] && e == 3 && m == 1) begin
          f.kind = OUT_CONST; f.word = {32{8'hFF}};
          for (int t = 0; t < 16; t++) begin
            gem[nsent][4*e + t/4][4*p + t%4] = 0; ghd[nsent][4*e + t/4][4*p + t%4] = 0;
          end
        end
        link[3*e+m] <= f;
      end
      nsent++;
    end
  end

  // ---------------------------------------------------------- checking
  function automatic int compare(int n, bit report);
    int bad = 0;
    int jc[4], ec[4], tc4[4], s, x, y;
    for (int k = 0; k < 4; k++) begin jc[k] = 0; ec[k] = 0; tc4[k] = 0; end
    for (int e = 0; e < 40; e++) for (int b = 0; b < 4; b++) begin
      ref_win_t r;
      r = window(gem[n], ghd[n], e, 4 * TID + b, int'(cfg.sw.em_iso_max), int'(cfg.sw.em_had_max), int'(cfg.sw.tau_ratio));
      if (jet_map[e][b] != r.jet || em_map[e][b] != r.em) begin
        bad++; if (report) $display("FAIL bc %0d window %0d,%0d jet %b/%b em %b/%b", n, e, b, jet_map[e][b], r.jet, em_map[e][b], r.em);
      end
      for (int k = 0; k < 4; k++) begin
        if (r.jet && r.jet_et > int'(cfg.jet_thr[k])) jc[k]++;
        if (r.em && r.em_et > int'(cfg.em_thr[k])) ec[k]++;
        if (r.tau && r.jet_et > int'(cfg.tau_thr[k])) tc4[k]++;
      end
      if (int'(l2_em[e][b]) != gem[n][e][4*TID+b] || int'(l2_hd[e][b]) != ghd[n][e][4*TID+b]) bad++;
    end
    for (int k = 0; k < 4; k++)
      if (int'(result.jet_cnt[k]) != jc[k] || int'(result.em_cnt[k]) != ec[k] || int'(result.tau_cnt[k]) != tc4[k]) begin
        bad++; if (report) $display("FAIL bc %0d counts thr %0d", n, k);
      end
    s = 0; x = 0; y = 0;
    for (int b = 0; b < 4; b++) begin
      int col; col = 0;
      for (int e = 0; e < 40; e++) col += gem[n][e][4*TID+b] + ghd[n][e][4*TID+b];
      s += col; x += col * cosw(4*TID+b); y += col * sinw(4*TID+b);
    end
    if (int'(result.sum_et) != s || int'(result.ex) != x || int'(result.ey) != y) begin
      bad++; if (report) $display("FAIL bc %0d sums", n);
    end
    return bad;
  endfunction

  int nres = 0, offs = -1;
  always @(posedge clk) if (rst_n && out_valid) begin
    nres++;
    if (offs < 0) begin
      for (int d = 0; d < nres && offs < 0; d++)
        if (compare(nres - 1 - d, 0) == 0 && nres - 1 - d < 3) offs = d;
    end
    if (offs >= 0 && nres - 1 - offs >= 0 && nres - 1 - offs < NBC) begin
      int n; n = nres - 1 - offs;
      checks++;
      if (compare(n, 1) != 0) failures++;
      if (masked[n]) nmasked++;
      for (int e = 0; e < 40; e++) for (int b = 0; b < 4; b++) begin njet += jet_map[e][b]; nem += em_map[e][b]; end
    end
  end

  initial begin
    cfg = '0;
    cfg.sw.em_iso_max = 12'd60; cfg.sw.em_had_max = 12'd40; cfg.sw.tau_ratio = 5'd9;
    for (int k = 0; k < 4; k++) begin
      cfg.jet_thr[k] = 12'(60 * k); cfg.em_thr[k] = 12'(40 * k); cfg.tau_thr[k] = 12'(50 * k);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (12 * (NBC + 10)) @(posedge clk);
    $display("results %0d latency offset %0d jets %0d em %0d masked frames %0d", nres, offs, njet, nem, nmasked);
    checks++;
    if (offs < 0 || njet < 50 || nem < 5 || nmasked < 2) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (12 * (NBC + 40)) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
