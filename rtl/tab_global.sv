// tab_global: "global" chip of a TAB.
//
// Collects the results of the ten sliding-windows chips of the board and
// prepares the outputs of the board:
//  - for the GAB: the number of jets, EM objects and taus above each of four
//    programmable E_T thresholds, the scalar E_T sum of the board's towers
//    and the Ex / Ey components of that E_T;
//  - for the Cal-Track match system: maps of the positions of the jet and EM
//    local maxima;
//  - for L2/L3: the E_T of every tower of the board.
// That the global chip reformats the sliding-windows results for the GAB,
// the Cal-Track system and L2/L3 and that global sums are formed follows the
// system description.  The content of the GAB word (counts per threshold,
// sums), the weights used for Ex/Ey (cos/sin of the centre of each phi bin
// in Q7, see cos_q7() in l1cal_pkg) and the output formats are choices of
// this design.
//
// Timing: in_valid marks the clock at which chip results and towers belong
// to the same beam crossing; all outputs are registered two clocks later
// with out_valid.
module tab_global
  import l1cal_pkg::*;
#(
  parameter int TAB_ID = 0
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        in_valid,
  input  win_result_t [SW_CHIPS-1:0][SW_WIN*SW_WIN-1:0] res,
  input  logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0]     em,   // board's own towers
  input  logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0]     hd,
  input  tab_cfg_t                                    cfg,
  output logic                                        out_valid,
  output tab_result_t                                 result,
  output logic [N_ETA-1:0][ADF_PHI-1:0]               jet_map,
  output logic [N_ETA-1:0][ADF_PHI-1:0]               em_map,
  output logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0]     l2_em,
  output logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0]     l2_hd
);
  localparam int NW  = SW_CHIPS * SW_WIN * SW_WIN;   // 160 windows
  localparam int COL_W = 16;

  // ------------------------------------------------------- stage 1
  logic [2:0][N_THR-1:0][NW-1:0] above;   // jet, EM, tau
  logic [ADF_PHI-1:0][COL_W-1:0] col;
  logic                          v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1      <= 1'b0;
      above   <= '0;
      col     <= '0;
      jet_map <= '0;
      em_map  <= '0;
      l2_em   <= '0;
      l2_hd   <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        for (int c = 0; c < SW_CHIPS; c++) begin
          for (int w = 0; w < SW_WIN * SW_WIN; w++) begin
            jet_map[c*SW_WIN + w/SW_WIN][w%SW_WIN] <= res[c][w].jet;
            em_map [c*SW_WIN + w/SW_WIN][w%SW_WIN] <= res[c][w].em;
            for (int t = 0; t < N_THR; t++) begin
              above[0][t][c*16+w] <= res[c][w].jet && (res[c][w].jet_et > cfg.jet_thr[t]);
              above[1][t][c*16+w] <= res[c][w].em  && (res[c][w].em_et  > cfg.em_thr[t]);
              above[2][t][c*16+w] <= res[c][w].tau && (res[c][w].jet_et > cfg.tau_thr[t]);
            end
          end
        end
        for (int p = 0; p < ADF_PHI; p++) begin
          logic [COL_W-1:0] s;
          s = '0;
          for (int e = 0; e < N_ETA; e++) s += COL_W'(em[e][p]) + COL_W'(hd[e][p]);
          col[p] <= s;
        end
        l2_em <= em;
        l2_hd <= hd;
      end
    end
  end

  // ------------------------------------------------------- stage 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        logic [SUM_W-1:0]        s;
        logic signed [EXY_W-1:0] x, y;
        for (int t = 0; t < N_THR; t++) begin
          result.jet_cnt[t] <= CNT_W'($countones(above[0][t]));
          result.em_cnt[t]  <= CNT_W'($countones(above[1][t]));
          result.tau_cnt[t] <= CNT_W'($countones(above[2][t]));
        end
        s = '0; x = '0; y = '0;
        for (int p = 0; p < ADF_PHI; p++) begin
          s += SUM_W'(col[p]);
          x += EXY_W'($signed({1'b0, col[p]}) * cos_q7(ADF_PHI * TAB_ID + p));
          y += EXY_W'($signed({1'b0, col[p]}) * sin_q7(ADF_PHI * TAB_ID + p));
        end
        result.sum_et <= s;
        result.ex     <= x;
        result.ey     <= y;
      end
    end
  end

endmodule
