// l1cal_top: the upgraded level-1 calorimeter trigger, ADF system to GAB.
//
// 2560 trigger pickoff signals (1280 towers, 40 in eta x 32 in phi, EM and
// HD each) are digitized and filtered by 80 ADF cards of 32 channels.  Each
// card covers 4 x 4 towers (card 8*e + p: eta block e, phi block p) and
// sends one frame per beam crossing over three identical links.  Eight TABs,
// one per 4-tower phi slice, each take 30 of those links (their own slice
// and both neighbours, phi wrapping around) and run the jet, EM and tau
// sliding-windows algorithms; the GAB merges the eight results into 64
// trigger decisions.  This system organisation follows the system
// description.
//
// Not part of this RTL, and brought out as ports instead: the analog front
// end and ADCs (adc samples in, ADC clock inversion and pedestal DAC codes
// out), the serial command link (the bc_sync pulses and l1_accept), the VME
// configuration path (a plain configuration request bus for the ADF cards,
// and static configuration words for the TABs and the GAB), the Channel Link
// serializers (the links are modelled as parallel frames) and the receiving
// systems (trigger framework, Cal-Track match, L2/L3).
//
// Timing: clk_adf = 8 x F_BC, clk_tab = 12 x F_BC, both locked to the beam
// crossing; bc_sync_adf / bc_sync_tab mark the start of a crossing in each
// domain.  See adf_card, tab and gab for the latencies of each stage.
module l1cal_top
  import l1cal_pkg::*;
(
  input  logic                                             clk_adf,
  input  logic                                             rst_adf_n,
  input  logic                                             bc_sync_adf,
  input  logic [N_ADF-1:0][ADF_CH-1:0][ADC_W-1:0]          adc,
  input  logic                                             l1_accept,
  input  cfg_req_t                                         cfg,
  output logic [15:0]                                      cfg_rdata,
  output logic                                             cfg_rvalid,
  output logic [N_ADF-1:0][ADF_CH-1:0]                     adc_clk_inv,
  output logic [N_ADF-1:0][ADF_CH-1:0][PED_W-1:0]          ped_code,

  input  logic                                             clk_tab,
  input  logic                                             rst_tab_n,
  input  logic                                             bc_sync_tab,
  input  tab_cfg_t                                         tab_cfg,
  input  trig_def_t [N_TRIG-1:0]                           trig_def,
  output logic                                             trig_valid,
  output logic [N_TRIG-1:0]                                trig,
  output logic [SUM_W+2:0]                                 sum_et,
  output logic [2*(EXY_W-4)-1:0]                           met_sq,
  output logic [N_TAB-1:0]                                 tab_valid,
  output logic [N_TAB-1:0][N_ETA-1:0][ADF_PHI-1:0]         caltrack_jet,
  output logic [N_TAB-1:0][N_ETA-1:0][ADF_PHI-1:0]         caltrack_em,
  output logic [N_TAB-1:0][N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0] l2_em,
  output logic [N_TAB-1:0][N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0] l2_hd
);
  // ------------------------------------------------------------ ADF system
  link_frame_t [N_ADF-1:0][2:0] adf_link;
  logic [N_ADF-1:0][15:0]       rdata;
  logic [N_ADF-1:0]             rvalid;

  for (genvar n = 0; n < N_ADF; n++) begin : g_adf
    adf_card u_adf (
      .card_id(7'(n)), .clk(clk_adf), .rst_n(rst_adf_n), .bc_sync(bc_sync_adf),
      .adc(adc[n]), .l1_accept, .cfg,
      .cfg_rdata(rdata[n]), .cfg_rvalid(rvalid[n]),
      .adc_clk_inv(adc_clk_inv[n]), .ped_code(ped_code[n]),
      .link(adf_link[n])
    );
  end

  always_comb begin
    cfg_rdata  = '0;
    cfg_rvalid = 1'b0;
    for (int n = 0; n < N_ADF; n++) begin
      if (rvalid[n]) begin
        cfg_rdata  = rdata[n];
        cfg_rvalid = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ TABs
  tab_result_t [N_TAB-1:0] tab_res;

  for (genvar t = 0; t < N_TAB; t++) begin : g_tab
    link_frame_t [TAB_LINKS-1:0] tl;
    for (genvar e = 0; e < N_ADF_ETA; e++) begin : g_e
      for (genvar m = 0; m < 3; m++) begin : g_m
        localparam int P = (t - 1 + m + N_ADF_PHI) % N_ADF_PHI;
        assign tl[3*e + m] = adf_link[N_ADF_PHI*e + P][m];
      end
    end
    tab #(.TAB_ID(t)) u_tab (
      .clk(clk_tab), .rst_n(rst_tab_n), .bc_sync(bc_sync_tab),
      .link(tl), .cfg(tab_cfg),
      .out_valid(tab_valid[t]), .result(tab_res[t]),
      .jet_map(caltrack_jet[t]), .em_map(caltrack_em[t]),
      .l2_em(l2_em[t]), .l2_hd(l2_hd[t])
    );
  end

  // ------------------------------------------------------------ GAB
  gab u_gab (
    .clk(clk_tab), .rst_n(rst_tab_n), .tab_valid(tab_valid[0]),
    .tab_res, .trig_def, .trig_valid, .trig, .sum_et, .met_sq
  );

endmodule
