// tb_adf_channel: drives one complete channel with pulse-shaped ADC data
// (and later a test-mode sequence) and compares every E_T produced with a
// software model of the chain: 2-of-4 sample selection, 8-tap FIR with
// saturation, 3-point peak detection, 1-of-2 down-sampling, shift and
// saturation, E_T table.  Also checks one E_T per beam crossing at a fixed
// phase, and reads back the three history buffers, frozen and running.
module tb_adf_channel;
  import l1cal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic adc_stb; logic [1:0] sample_idx; logic [ADC_W-1:0] adc;
  logic cfg_we = 0; cfg_reg_e cfg_reg = REG_CTRL; logic [9:0] cfg_idx = 0; logic [15:0] cfg_data = 0;
  logic adc_clk_inv; logic [PED_W-1:0] ped_code;
  logic et_valid; logic [ET_W-1:0] et;
  logic freeze = 0; cfg_reg_e hist_sel = REG_HIST_RAW; logic [HIST_AW-1:0] hist_back = 0, raw_back = 0;
  logic [15:0] hist_rdata; logic [ADC_W-1:0] raw_rdata;
  int checks = 0, failures = 0;

  adf_channel dut (.*);
  always #5 clk = ~clk;

  // BC phase: 8 clocks per crossing, ADC sample on even phases
  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign adc_stb    = (cyc % 2 == 0);
  assign sample_idx = 2'((cyc % 8) / 2);

  // ------------------------------------------------------------ settings
  int coef[8]; int lut[1024]; int tmem[64];
  bit sphase, dphase, tmode; int shift, tlen;

  // ADC stimulus: pedestal + pulses of the trigger pickoff shape
  int nsamp = 0; int amp = 0, age = 100;
  function automatic int shape(int a, int t); // t in ADC samples (33 ns)
    if (t < 8) return a * t / 8;                 // ~250 ns rise
    if (t < 22) return a - a * (t - 8) / 14;     // tail
    return 0;
  endfunction
  always_ff @(posedge clk) if (adc_stb) begin
    nsamp <= nsamp + 1;
    if (age > 30 && ($urandom % 16 == 0)) begin amp <= $urandom % 900; age <= 0; end
    else age <= age + 1;
  end
  assign adc = ADC_W'(40 + shape(amp, age) + int'(cyc % 3));

  // ------------------------------------------------------------ reference
  int y1 = 0, y2 = 0, tptr = 0; bit pair1 = 0;
  int xs[8];
  int expq[$];
  int adc_hist[$], fir_hist[$], et_hist[$];
  int pend_val[$], pend_due[$];
  always @(posedge clk) if (rst_n) begin
    // the FIR result of a sample is written to its history 3 clocks later
    while (pend_due.size() > 0 && pend_due[0] <= cyc) begin
      void'(pend_due.pop_front());
      if (!freeze) fir_hist.push_back(pend_val.pop_front()); else void'(pend_val.pop_front());
    end
    if (adc_stb && !freeze) adc_hist.push_back(int'(adc));
    if (adc_stb && sample_idx[0] == sphase) begin
      int x, y; longint acc;
      if (tmode) begin x = tmem[tptr]; tptr = (tptr == tlen - 1) ? 0 : tptr + 1; end
      else x = int'(adc);
      for (int k = 7; k > 0; k--) xs[k] = xs[k-1];
      xs[0] = x;
      acc = 0;
      for (int k = 0; k < 8; k++) acc += longint'(xs[k]) * coef[k];
      y = (acc > 32767) ? 32767 : (acc < -32768) ? -32768 : int'(acc);
      pend_val.push_back(y); pend_due.push_back(cyc + 3);
      // peak of the previous sample
      if (y1 > y && y1 > y2 && y1 > 0 && pair1 == dphase) begin
        int a; a = y1 >> shift; if (a > 1023) a = 1023;
        expq.push_back(lut[a]);
      end else if (pair1 == dphase) expq.push_back(lut[0]);
      y2 = y1; y1 = y; pair1 = sample_idx[1];
    end
  end

  // ------------------------------------------------------------ checker
  int last_et_cyc = -1, et_phase = -1, npeaks = 0; bit run = 0;
  always @(posedge clk) if (rst_n && et_valid) begin
    int e;
    if (run) checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected et"); end
    else begin
      e = expq.pop_front();
      if (run && int'(et) != e) begin failures++; $display("FAIL et=%0d exp=%0d at %0d", et, e, cyc); end
      if (run && e != lut[0]) npeaks++;
    end
    if (!freeze) et_hist.push_back(int'(et));
    if (last_et_cyc >= 0 && cyc - last_et_cyc != 8) begin
      failures++; $display("FAIL et spacing %0d", cyc - last_et_cyc);
    end
    last_et_cyc = cyc;
  end

  task automatic wr(cfg_reg_e r, int idx, int d);
    @(negedge clk); cfg_we = 1; cfg_reg = r; cfg_idx = 10'(idx); cfg_data = 16'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic configure();
    chan_ctrl_t c;
    for (int k = 0; k < 8; k++) wr(REG_COEF, k, coef[k]);
    c = '0; c.sample_phase = sphase; c.dec_phase = dphase; c.scale_shift = 4'(shift);
    c.test_mode = tmode; c.test_len_m1 = 6'(tlen - 1); c.adc_clk_inv = 1;
    wr(REG_CTRL, 0, int'(c));
    wr(REG_PED, 0, 8'hA5);
  endtask

  task automatic check_history();
    for (int b = 0; b < 40; b += 3) begin
      @(negedge clk); hist_sel = REG_HIST_RAW; hist_back = HIST_AW'(b); raw_back = HIST_AW'(b + 1);
      @(negedge clk); checks += 2;
      if (int'(hist_rdata) != adc_hist[adc_hist.size()-1-b]) begin failures++; $display("FAIL raw hist %0d", b); end
      if (int'(raw_rdata) != adc_hist[adc_hist.size()-2-b]) begin failures++; $display("FAIL raw port b %0d", b); end
      @(negedge clk); hist_sel = REG_HIST_FIR;
      @(negedge clk); checks++;
      if (int'($signed(hist_rdata)) != fir_hist[fir_hist.size()-1-b]) begin failures++; $display("FAIL fir hist %0d: %0d vs %0d", b, $signed(hist_rdata), fir_hist[fir_hist.size()-1-b]); end
      @(negedge clk); hist_sel = REG_HIST_ET; hist_back = HIST_AW'(b / 3);
      @(negedge clk); checks++;
      if (int'(hist_rdata) != et_hist[et_hist.size()-1-b/3]) begin failures++; $display("FAIL et hist %0d", b); end
    end
  endtask

  initial begin
    coef = '{-3, 4, 11, 9, 2, -4, -2, 0};
    for (int i = 0; i < 1024; i++) lut[i] = (i < 255) ? i : 255;
    for (int i = 0; i < 64; i++) tmem[i] = (i % 9 == 4) ? 700 : 30 + i;
    sphase = 0; dphase = 0; tmode = 0; shift = 2; tlen = 16;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 1024; i++) wr(REG_LUT, i, lut[i]);
    for (int i = 0; i < 64; i++) wr(REG_TEST, i, tmem[i]);
    configure();
    repeat (4) @(posedge clk);
    repeat (200) @(posedge clk);
    run = 1;
    repeat (1600) @(posedge clk);
    checks++; if (adc_clk_inv !== 1'b1 || ped_code !== 8'hA5) begin failures++; $display("FAIL ctrl outputs"); end
    // freeze and check the history buffers
    @(negedge clk); freeze = 1;
    repeat (50) @(posedge clk);
    check_history();
    @(negedge clk); freeze = 0;
    repeat (600) @(posedge clk);
    @(negedge clk); freeze = 1;
    repeat (10) @(posedge clk);
    check_history();
    if (npeaks < 20) begin failures++; $display("FAIL only %0d peaks", npeaks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
