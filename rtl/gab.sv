// gab: global algorithm board.
//
// Merges the results of the eight TABs and makes up to 64 yes/no trigger
// decisions for the level-1 trigger framework, as in the system description.
// The object counts per threshold and the scalar E_T sums of the boards are
// added; the Ex and Ey sums are added, scaled back from Q7 to E_T units and
// squared to give the missing E_T squared.  Each of the 64 triggers is
// defined by an enable, a source (0-3 jet counts, 4-7 EM counts, 8-11 tau
// counts, 12 scalar E_T, 13 missing E_T) and a 16-bit threshold; it fires
// when the source is at least the threshold (for missing E_T:
// MET^2 >= thr^2).  The definition format is a choice of this design.
//
// Timing: tab_valid marks the clock at which all eight results belong to
// the same beam crossing; trig is registered two clocks later with
// trig_valid, and holds until the next decision.
module gab
  import l1cal_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          tab_valid,
  input  tab_result_t [N_TAB-1:0]       tab_res,
  input  trig_def_t   [N_TRIG-1:0]      trig_def,
  output logic                          trig_valid,
  output logic [N_TRIG-1:0]             trig,
  output logic [SUM_W+2:0]              sum_et,
  output logic [2*(EXY_W-4)-1:0]        met_sq
);
  localparam int TCNT_W = CNT_W + 3;
  localparam int TXY_W  = EXY_W + 3;
  localparam int MXY_W  = TXY_W - 7;   // after removing the Q7 scale

  logic                           v1;
  logic [3*N_THR-1:0][TCNT_W-1:0] cnt;
  logic signed [TXY_W-1:0]        ex, ey;
  logic signed [MXY_W-1:0]        mx, my;
  logic signed [2*MXY_W-1:0]      mxe, mye;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      cnt    <= '0;
      sum_et <= '0;
      ex     <= '0;
      ey     <= '0;
    end else begin
      v1 <= tab_valid;
      if (tab_valid) begin
        logic [3*N_THR-1:0][TCNT_W-1:0] c;
        logic [SUM_W+2:0]               s;
        logic signed [TXY_W-1:0]        x, y;
        c = '0; s = '0; x = '0; y = '0;
        for (int t = 0; t < N_TAB; t++) begin
          for (int k = 0; k < N_THR; k++) begin
            c[k]           += TCNT_W'(tab_res[t].jet_cnt[k]);
            c[N_THR + k]   += TCNT_W'(tab_res[t].em_cnt[k]);
            c[2*N_THR + k] += TCNT_W'(tab_res[t].tau_cnt[k]);
          end
          s += (SUM_W+3)'(tab_res[t].sum_et);
          x += TXY_W'(tab_res[t].ex);
          y += TXY_W'(tab_res[t].ey);
        end
        cnt    <= c;
        sum_et <= s;
        ex     <= x;
        ey     <= y;
      end
    end
  end

  assign mx     = MXY_W'(ex >>> 7);
  assign my     = MXY_W'(ey >>> 7);
  assign mxe    = (2*MXY_W)'(mx);
  assign mye    = (2*MXY_W)'(my);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_valid <= 1'b0;
      trig       <= '0;
      met_sq     <= '0;
    end else begin
      trig_valid <= v1;
      if (v1) begin
        logic [2*MXY_W-1:0] m2;
        m2 = mxe * mxe + mye * mye;
        met_sq <= m2;
        for (int i = 0; i < N_TRIG; i++) begin
          logic hit;
          if (trig_def[i].src < 4'd12)
            hit = cnt[trig_def[i].src] >= TCNT_W'(trig_def[i].thr);
          else if (trig_def[i].src == 4'd12)
            hit = sum_et >= (SUM_W+3)'(trig_def[i].thr);
          else if (trig_def[i].src == 4'd13)
            hit = m2 >= (2*MXY_W)'(32'(trig_def[i].thr) * 32'(trig_def[i].thr));
          else
            hit = 1'b0;
          trig[i] <= trig_def[i].en && hit;
        end
      end
    end
  end

endmodule
