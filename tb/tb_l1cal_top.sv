// tb_l1cal_top: end-to-end run of the whole trigger at its full size
// (80 ADF cards, 2560 channels, 8 TABs, GAB).
//  1. All cards and channels are loaded at once over the configuration bus
//     (broadcast): FIR = single tap of 1, E_T table = min(address, 255),
//     samples 0 and 2 of each crossing kept.
//  2. For a series of crossings a random calorimeter map is drawn and every
//     tower with energy E receives an ADC pulse whose kept samples are
//     0, E, 0, so the filter chain must return exactly E.  Jets, isolated
//     EM deposits and narrow jets are planted on top of random background.
//  3. Every GAB decision, the scalar E_T, the missing E_T squared and the
//     Cal-Track maps of all eight TABs are compared with the software
//     reference applied to the drawn map.
//  4. A level-1 accept with raw readout enabled makes the cards send raw
//     frames, which the TABs must ignore; a software trigger freezes the
//     history buffers, which are then read back over the bus.
// Each mechanism is counted and must have happened at least once.
module tb_l1cal_top;
  import l1cal_pkg::*;
  import tb_ref_pkg::*;

  logic clk_adf = 0, clk_tab = 0, rst_adf_n = 0, rst_tab_n = 0;
  logic bc_sync_adf, bc_sync_tab, l1_accept = 0;
  logic [N_ADF-1:0][ADF_CH-1:0][ADC_W-1:0] adc;
  cfg_req_t cfg = '0;
  logic [15:0] cfg_rdata; logic cfg_rvalid;
  logic [N_ADF-1:0][ADF_CH-1:0] adc_clk_inv;
  logic [N_ADF-1:0][ADF_CH-1:0][PED_W-1:0] ped_code;
  tab_cfg_t tab_cfg; trig_def_t [N_TRIG-1:0] trig_def;
  logic trig_valid; logic [N_TRIG-1:0] trig;
  logic [SUM_W+2:0] sum_et; logic [2*(EXY_W-4)-1:0] met_sq;
  logic [N_TAB-1:0] tab_valid;
  logic [N_TAB-1:0][N_ETA-1:0][ADF_PHI-1:0] caltrack_jet, caltrack_em;
  logic [N_TAB-1:0][N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0] l2_em, l2_hd;

  l1cal_top dut (.*);

  always #33 clk_adf = ~clk_adf;   // 8 x F_BC
  always #22 clk_tab = ~clk_tab;   // 12 x F_BC

  int checks = 0, failures = 0;
  int ac = 0, tc = 0;
  always @(posedge clk_adf) ac <= ac + 1;
  always @(posedge clk_tab) tc <= tc + 1;
  assign bc_sync_adf = (ac % 8 == 0);
  assign bc_sync_tab = (tc % 12 == 0);

  // ------------------------------------------------------------- event maps
  localparam int NEV = 14;
  int ev_start = 1 << 30;              // crossing number of event 0
  tmap_t gem [NEV], ghd [NEV];

  function automatic void draw(int n);
    for (int e = 0; e < 40; e++) for (int p = 0; p < 32; p++) begin
      int r; r = $urandom % 100;
      gem[n][e][p] = (r < 80) ? 0 : (r < 95) ? 1 + $urandom % 5 : $urandom % 120;
      ghd[n][e][p] = (r < 90) ? 0 : $urandom % 30;
    end
    // a few jets, isolated electrons and narrow jets
    for (int k = 0; k < 6; k++) begin
      int e, p; e = $urandom % 40; p = $urandom % 32;
      case (k % 3)
        0: for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
             if (e + i < 40) begin gem[n][e+i][(p+j)%32] = 60 + $urandom % 100; ghd[n][e+i][(p+j)%32] = 40 + $urandom % 60; end
        1: begin
             for (int i = -2; i < 4; i++) for (int j = -2; j < 4; j++)
               if (e + i >= 0 && e + i < 40) begin gem[n][e+i][(p+j+32)%32] = 0; ghd[n][e+i][(p+j+32)%32] = 0; end
             gem[n][e][p] = 200 + $urandom % 55;
           end
        default: begin
             for (int i = -2; i < 4; i++) for (int j = -2; j < 4; j++)
               if (e + i >= 0 && e + i < 40) begin gem[n][e+i][(p+j+32)%32] = 0; ghd[n][e+i][(p+j+32)%32] = 0; end
             gem[n][e][p] = 150; ghd[n][e][p] = 100;
           end
      endcase
    end
  endfunction

  // ADC drive: tower energy E of the crossing in sample 0, zero elsewhere
  always_comb begin
    int bcn, idx, n;
    bcn = ac / 8; idx = (ac % 8) / 2; n = bcn - ev_start;
    for (int c = 0; c < N_ADF; c++) for (int ch = 0; ch < ADF_CH; ch++) begin
      int e, p, v;
      e = 4 * (c / 8) + (ch % 16) / 4;
      p = 4 * (c % 8) + ch % 4;
      v = 0;
      if (n >= 0 && n < NEV && idx == 0) v = (ch < 16) ? gem[n][e][p] : ghd[n][e][p];
      adc[c][ch] = ADC_W'(v);
    end
  end

  // ------------------------------------------------------------- reference
  typedef struct { bit trig[N_TRIG]; longint sum; longint m2; int jets; int ems; int taus; } ev_ref_t;
  ev_ref_t evr [NEV];

  function automatic void reference(int n);
    int cnt[12]; longint s, x, y, mx, my;
    for (int k = 0; k < 12; k++) cnt[k] = 0;
    evr[n].jets = 0; evr[n].ems = 0; evr[n].taus = 0;
    for (int e = 0; e < 40; e++) for (int p = 0; p < 32; p++) begin
      ref_win_t r;
      r = window(gem[n], ghd[n], e, p, int'(tab_cfg.sw.em_iso_max), int'(tab_cfg.sw.em_had_max), int'(tab_cfg.sw.tau_ratio));
      evr[n].jets += r.jet; evr[n].ems += r.em; evr[n].taus += r.tau;
      for (int k = 0; k < 4; k++) begin
        if (r.jet && r.jet_et > int'(tab_cfg.jet_thr[k])) cnt[k]++;
        if (r.em  && r.em_et  > int'(tab_cfg.em_thr[k]))  cnt[4+k]++;
        if (r.tau && r.jet_et > int'(tab_cfg.tau_thr[k])) cnt[8+k]++;
      end
    end
    s = 0; x = 0; y = 0;
    for (int t = 0; t < 8; t++) begin
      longint tx, ty; tx = 0; ty = 0;
      for (int b = 0; b < 4; b++) begin
        int col; col = 0;
        for (int e = 0; e < 40; e++) col += gem[n][e][4*t+b] + ghd[n][e][4*t+b];
        s += col; tx += col * cosw(4*t+b); ty += col * sinw(4*t+b);
      end
      x += tx; y += ty;
    end
    mx = x >>> 7; my = y >>> 7;
    evr[n].sum = s; evr[n].m2 = mx * mx + my * my;
    for (int i = 0; i < N_TRIG; i++) begin
      bit h; int src; src = int'(trig_def[i].src);
      if (src < 12) h = cnt[src] >= int'(trig_def[i].thr);
      else if (src == 12) h = s >= longint'(trig_def[i].thr);
      else h = evr[n].m2 >= longint'(trig_def[i].thr) * longint'(trig_def[i].thr);
      evr[n].trig[i] = h && trig_def[i].en;
    end
  endfunction

  // ------------------------------------------------------------- checker
  int nres = 0, first_ok = -1, nchecked = 0, nfired = 0, njets = 0, nems = 0, ntaus = 0;
  int mismatch_first = 0;
  always @(posedge clk_tab) if (rst_tab_n && trig_valid) begin
    nres++;
    // the result of event 0 is recognised by its scalar E_T
    if (first_ok < 0 && ev_start < (1 << 30) && longint'(sum_et) == evr[0].sum) first_ok = nres - 1;
    if (first_ok >= 0 && nres - 1 - first_ok < NEV) begin
      int n; n = nres - 1 - first_ok;
      checks++;
      if (longint'(sum_et) != evr[n].sum || longint'(met_sq) != evr[n].m2) begin
        failures++; $display("FAIL event %0d sums %0d/%0d %0d/%0d", n, sum_et, evr[n].sum, met_sq, evr[n].m2);
      end
      for (int i = 0; i < N_TRIG; i++) begin
        checks++;
        if (trig[i] != evr[n].trig[i]) begin failures++; $display("FAIL event %0d trigger %0d", n, i); end
        nfired += trig[i];
      end
      // Cal-Track maps of all boards
      for (int t = 0; t < 8; t++) for (int e = 0; e < 40; e++) for (int b = 0; b < 4; b++) begin
        ref_win_t r;
        r = window(gem[n], ghd[n], e, 4*t+b, int'(tab_cfg.sw.em_iso_max), int'(tab_cfg.sw.em_had_max), int'(tab_cfg.sw.tau_ratio));
        if (caltrack_jet[t][e][b] != r.jet || caltrack_em[t][e][b] != r.em) begin
          failures++; $display("FAIL event %0d Cal-Track tab %0d %0d,%0d", n, t, e, b);
        end
      end
      checks++;
      njets += evr[n].jets; nems += evr[n].ems; ntaus += evr[n].taus;
      nchecked++;
    end
  end

  // raw frames after the level-1 accept, seen on a link
  int nraw = 0;
  always @(posedge clk_adf) if (dut.adf_link[17][1].kind == OUT_RAW && ac % 8 == 1) nraw++;

  // ------------------------------------------------------------- bus
  task automatic wr(cfg_reg_e r, int idx, int d, int card = 0, bit cb = 1);
    @(negedge clk_adf);
    cfg = '0; cfg.wr = 1; cfg.rsel = r; cfg.idx = 10'(idx); cfg.data = 16'(d);
    cfg.card_bcast = cb; cfg.card = 7'(card); cfg.chan_bcast = 1;
    @(negedge clk_adf); cfg = '0;
  endtask

  int nfreeze_ok = 0;
  initial begin
    tab_cfg = '0;
    tab_cfg.sw.em_iso_max = 12'd20; tab_cfg.sw.em_had_max = 12'd10; tab_cfg.sw.tau_ratio = 5'd8;
    for (int k = 0; k < 4; k++) begin
      tab_cfg.jet_thr[k] = 12'(150 * k); tab_cfg.em_thr[k] = 12'(60 * k); tab_cfg.tau_thr[k] = 12'(100 * k);
    end
    for (int i = 0; i < N_TRIG; i++) begin
      trig_def[i].en = (i != 63);
      trig_def[i].src = 4'(i % 14);
      case (i % 14)
        12: trig_def[i].thr = 16'(3000 + 1500 * (i / 14));
        13: trig_def[i].thr = 16'(100 + 150 * (i / 14));
        default: trig_def[i].thr = 16'(1 + 2 * (i / 14));
      endcase
    end
    for (int n = 0; n < NEV; n++) begin draw(n); reference(n); end

    repeat (3) @(posedge clk_adf);
    rst_adf_n = 1; rst_tab_n = 1;
    wr(REG_COEF, 0, 1);
    wr(REG_CTRL, 0, 0);
    for (int i = 0; i < 1024; i++) wr(REG_LUT, i, (i < 255) ? i : 255);
    repeat (16) @(posedge clk_adf);
    ev_start = ac / 8 + 2;
    repeat (8 * (NEV + 12)) @(posedge clk_adf);

    // raw readout after a level-1 accept: link frames switch to raw data
    wr(REG_CARD, CARD_L1_LAT, 20);
    wr(REG_CARD, CARD_RAW_L1A, 16'h0100 | 3);
    @(negedge clk_adf); l1_accept = 1; @(negedge clk_adf); l1_accept = 0;
    repeat (8 * 6) @(posedge clk_adf);

    // software trigger freezes the history buffers; read back E_T history of
    // card 12 channel 3 and raw history of card 40 channel 20 (both zero now)
    wr(REG_SWTRIG, 0, 0);
    repeat (4) @(posedge clk_adf);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk_adf);
      cfg = '0; cfg.rd = 1; cfg.rsel = REG_HIST_RAW; cfg.card = 7'd40; cfg.chan = 5'd20; cfg.idx = 10'(b);
      @(negedge clk_adf); cfg = '0;
      @(negedge clk_adf);
      checks++;
      if (!cfg_rvalid || cfg_rdata != 0) begin failures++; $display("FAIL history read-back"); end
      else nfreeze_ok++;
    end

    $display("checked %0d events, triggers fired %0d, jets %0d, EM %0d, taus %0d, raw frames %0d, history reads %0d",
             nchecked, nfired, njets, nems, ntaus, nraw, nfreeze_ok);
    checks++;
    if (nchecked != NEV) begin failures++; $display("FAIL only %0d events checked", nchecked); end
    if (nfired == 0 || njets == 0 || nems == 0 || ntaus == 0 || nraw == 0 || nfreeze_ok == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * 400) @(posedge clk_adf);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
