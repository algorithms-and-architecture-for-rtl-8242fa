// tb_adf_card: one ADF card driven through its configuration bus.
// Checks, each against values worked out in the testbench:
//  - filtered mode: isolated pulses on several channels give exactly one
//    non-zero word, of the expected E_T, on the right channel;
//  - constant and pseudorandom modes (LFSR stepped in the testbench);
//  - raw mode (newest ADC sample, 8 MSBs);
//  - raw readout after a level-1 accept: N frames of the triggering event's
//    samples, then automatic return to filtered data;
//  - freeze on software trigger and on L1 accept, history read-back over
//    the bus, unfreeze;
//  - three identical links, one frame (toggle flip) per beam crossing.
module tb_adf_card;
  import l1cal_pkg::*;
  logic clk = 0, rst_n = 0, bc_sync = 0, l1_accept = 0;
  logic [ADF_CH-1:0][ADC_W-1:0] adc;
  cfg_req_t cfg = '0;
  logic [15:0] cfg_rdata; logic cfg_rvalid;
  logic [ADF_CH-1:0] adc_clk_inv; logic [ADF_CH-1:0][PED_W-1:0] ped_code;
  link_frame_t [2:0] link;
  int checks = 0, failures = 0;

  logic [6:0] card_id = 7'd5;
  adf_card dut (.*);
  always #5 clk = ~clk;

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  always_comb bc_sync = (cyc % 8 == 0);

  // ---------------------------------------------------------------- ADC
  bit ramp = 0;
  int nsamp = 0;                      // samples presented so far
  int pulse_ch = -1, pulse_bc = -1, pulse_amp = 0;
  int samples[ADF_CH][$];
  always_comb begin
    for (int c = 0; c < ADF_CH; c++) begin
      int bcn, idx, v;
      bcn = cyc / 8; idx = (cyc % 8) / 2;
      if (ramp) v = (nsamp * 7 + c * 13 + 5) % 1024;
      else begin
        v = 100;
        if (c == pulse_ch) begin
          if (bcn == pulse_bc - 1 && idx == 2) v = 250;
          if (bcn == pulse_bc && idx == 0) v = pulse_amp;
          if (bcn == pulse_bc && idx == 2) v = 200;
        end
      end
      adc[c] = ADC_W'(v);
    end
  end
  bit frozen_tb = 0;
  always @(posedge clk) if (rst_n && cyc % 2 == 0) begin
    if (!frozen_tb) for (int c = 0; c < ADF_CH; c++) samples[c].push_back(int'(adc[c]));
    nsamp++;
  end

  // ---------------------------------------------------------------- frames
  link_frame_t frames[$];
  bit last_tog = 0; int last_frame_cyc = -1;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (link[0] !== link[1] || link[0] !== link[2]) begin failures++; $display("FAIL copies differ"); end
    if (link[0].toggle != last_tog) begin
      frames.push_back(link[0]);
      if (last_frame_cyc >= 0 && cyc - last_frame_cyc != 8) begin failures++; $display("FAIL frame spacing"); end
      last_frame_cyc = cyc;
      last_tog = link[0].toggle;
    end
  end

  // ---------------------------------------------------------------- bus
  task automatic wr(cfg_reg_e r, int idx, int d, bit cb = 0, int ch = 0, bit chb = 1, int card = 5);
    @(negedge clk);
    cfg = '0; cfg.wr = 1; cfg.rsel = r; cfg.idx = 10'(idx); cfg.data = 16'(d);
    cfg.card_bcast = cb; cfg.card = 7'(card); cfg.chan_bcast = chb; cfg.chan = 5'(ch);
    @(negedge clk); cfg = '0;
  endtask

  task automatic rd(cfg_reg_e r, int ch, int idx, output int v);
    @(negedge clk);
    cfg = '0; cfg.rd = 1; cfg.rsel = r; cfg.idx = 10'(idx); cfg.card = 7'd5; cfg.chan = 5'(ch);
    @(negedge clk); cfg = '0;
    @(negedge clk);
    if (!cfg_rvalid) begin failures++; $display("FAIL no rvalid"); end
    v = int'(cfg_rdata);
  endtask

  function automatic logic [31:0] lfsr_step(logic [31:0] s);
    return {s[30:0], 1'b0} ^ (s[31] ? 32'h0040_0003 : 32'h0);
  endfunction

  int seen;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // card 5 responds to broadcast and its own number, not to card 6
    wr(REG_CTRL, 0, 16'h0008 | 16'h0002, 1);          // shift 2, adc clock inverted
    wr(REG_COEF, 0, 1, 1);
    for (int k = 1; k < 8; k++) wr(REG_COEF, k, 0, 1);
    for (int i = 0; i < 1024; i++) wr(REG_LUT, i, (i < 255) ? i : 255, 1);
    wr(REG_PED, 0, 8'h3C, 0, 7, 0);
    wr(REG_PED, 0, 8'h11, 0, 7, 0, 6);                // other card: ignored
    checks++;
    if (ped_code[7] != 8'h3C || ped_code[6] != 0 || adc_clk_inv != '1) begin
      failures++; $display("FAIL pedestal/clock outputs");
    end

    // ------------------------------------------------ filtered pulses
    for (int t = 0; t < 6; t++) begin
      int ch, amp, exp_et, nbefore;
      ch = (t * 11 + 3) % ADF_CH; amp = 400 + t * 120;
      exp_et = (amp >> 2) > 255 ? 255 : (amp >> 2);
      pulse_ch = ch; pulse_amp = amp; pulse_bc = cyc / 8 + 3;
      nbefore = frames.size();
      repeat (8 * 12) @(posedge clk);
      seen = 0;
      for (int f = nbefore; f < frames.size(); f++)
        for (int c = 0; c < ADF_CH; c++)
          if (frames[f].word[c] != 0) begin
            seen++;
            checks++;
            if (c != ch || int'(frames[f].word[c]) != exp_et || frames[f].kind != OUT_FILTERED) begin
              failures++; $display("FAIL pulse ch %0d/%0d et %0d/%0d", c, ch, frames[f].word[c], exp_et);
            end
          end
      checks++;
      if (seen != 1) begin failures++; $display("FAIL pulse %0d seen %0d times", t, seen); end
    end
    pulse_ch = -1;

    // ------------------------------------------------ constant
    wr(REG_CARD, CARD_CONST, 8'h5A);
    wr(REG_CARD, CARD_OUT_MODE, OUT_CONST);
    repeat (40) @(posedge clk);
    checks++;
    if (frames[$].kind != OUT_CONST || frames[$].word != {ADF_CH{8'h5A}}) begin failures++; $display("FAIL const"); end

    // ------------------------------------------------ pseudorandom
    wr(REG_CARD, CARD_OUT_MODE, OUT_PRBS);
    repeat (20) @(posedge clk);
    seen = frames.size();
    repeat (80) @(posedge clk);
    for (int f = seen; f + 1 < frames.size(); f++) begin
      logic [31:0] s0, s1;
      s0 = {frames[f].word[3], frames[f].word[2], frames[f].word[1], frames[f].word[0]};
      s1 = {frames[f+1].word[3], frames[f+1].word[2], frames[f+1].word[1], frames[f+1].word[0]};
      checks++;
      if (s1 != lfsr_step(s0) || frames[f].word[7:4] != frames[f].word[3:0] || frames[f].kind != OUT_PRBS) begin
        failures++; $display("FAIL prbs");
      end
    end

    // ------------------------------------------------ raw mode
    ramp = 1;
    wr(REG_CARD, CARD_OUT_MODE, OUT_RAW);
    repeat (20) @(posedge clk);
    seen = frames.size();
    repeat (64) @(posedge clk);
    for (int f = seen; f < frames.size(); f++) begin
      int n; bit ok; ok = 0;
      // newest sample at the frame update is one of the ramp values
      for (int c = 0; c < ADF_CH; c++) begin
        n = 0;
      end
      for (int k = 0; k < samples[0].size(); k++)
        if (int'(frames[f].word[0]) == (samples[0][k] >> 2) && int'(frames[f].word[9]) == (samples[9][k] >> 2)) ok = 1;
      checks++;
      if (!ok || frames[f].kind != OUT_RAW) begin failures++; $display("FAIL raw frame"); end
    end
    // consecutive raw frames are 4 samples apart
    for (int f = seen; f + 1 < frames.size(); f++) begin
      checks++;
      if (int'(frames[f+1].word[2]) != (((int'(frames[f].word[2]) * 4 + 28) % 1024) >> 2) &&
          int'(frames[f+1].word[2]) != (((int'(frames[f].word[2]) * 4 + 28 + 3) % 1024) >> 2) &&
          int'(frames[f+1].word[2]) != (((int'(frames[f].word[2]) * 4 + 28 - 3) % 1024) >> 2)) begin
        failures++; $display("FAIL raw step %0d -> %0d", frames[f].word[2], frames[f+1].word[2]);
      end
    end

    // ------------------------------------------------ raw readout after L1 accept
    wr(REG_CARD, CARD_OUT_MODE, OUT_CONST);
    wr(REG_CARD, CARD_L1_LAT, 40);
    wr(REG_CARD, CARD_RAW_L1A, 16'h0100 | 5);
    repeat (13) @(posedge clk);
    begin
      int s0, nbefore;
      @(negedge clk); l1_accept = 1;
      s0 = samples[0].size() - 1 - 40;        // event sample: 40 nbefore the newest
      nbefore = frames.size();
      @(negedge clk); l1_accept = 0;
      repeat (8 * 9) @(posedge clk);
      seen = 0;
      for (int f = nbefore; f < frames.size(); f++) begin
        if (frames[f].kind == OUT_RAW) begin
          for (int c = 0; c < ADF_CH; c += 5) begin
            checks++;
            if (int'(frames[f].word[c]) != (samples[c][s0 + seen] >> 2)) begin
              failures++; $display("FAIL L1A raw frame %0d ch %0d: %0d vs %0d", seen, c, frames[f].word[c], samples[c][s0 + seen] >> 2);
            end
          end
          seen++;
        end
      end
      checks += 2;
      if (seen != 5) begin failures++; $display("FAIL L1A raw frames %0d", seen); end
      if (frames[$].kind != OUT_CONST) begin failures++; $display("FAIL no return after raw readout"); end
    end

    // ------------------------------------------------ freeze, read-back
    begin
      int v, n0;
      wr(REG_SWTRIG, 0, 0);
      frozen_tb = 1;
      n0 = samples[4].size();
      repeat (50) @(posedge clk);
      for (int b = 0; b < 30; b += 7) begin
        rd(REG_HIST_RAW, 4, b, v);
        checks++;
        if (v != samples[4][n0 - 1 - b]) begin failures++; $display("FAIL readback %0d: %0d vs %0d", b, v, samples[4][n0-1-b]); end
      end
      wr(REG_CARD, CARD_UNFREEZE, 0);
      frozen_tb = 0;
      wr(REG_CARD, CARD_FREEZE, 1);
      repeat (100) @(posedge clk);
      @(negedge clk); l1_accept = 1; @(negedge clk); l1_accept = 0;
      frozen_tb = 1;
      n0 = samples[9].size();
      repeat (50) @(posedge clk);
      for (int b = 0; b < 30; b += 5) begin
        rd(REG_HIST_RAW, 9, b, v);
        checks++;
        if (v != samples[9][n0 - 1 - b]) begin failures++; $display("FAIL L1A freeze readback %0d: %0d vs %0d", b, v, samples[9][n0-1-b]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
