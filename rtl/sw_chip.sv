// sw_chip: one "sliding windows" chip of a trigger algorithm board (TAB).
//
// Each chip finds local maxima among 4 x 4 = 16 candidate 2x2-tower windows
// (candidate (a,b) covers towers eta 4c+a..+1, phi b..+1 of its block) and
// receives the 9 x 9 towers around its block that the search needs.  All
// window sums and all local-maximum comparisons are done bit-serially with
// 12-bit words, one bit per clock, 12 clocks per beam crossing, fully
// pipelined, as in the system description:
//   s1  tower E_T = EM + HD
//   s2  sums of two towers adjacent in phi
//   s3  2x2 window sums W2 (total, EM, HD)            -> local-maximum compares
//   s4  sums of two W2 two towers apart in eta
//   s5  4x4 sums W4 = ring of one tower around the window (total and EM)
// Jet: W2 of the candidate is compared with the 24 windows whose lower-left
// tower lies in the 5x5 region around it: strictly greater than those above
// and to the right, greater or equal to those below and to the left (the
// exact pattern is lm_strict() in l1cal_pkg).  Jet E_T is W4.  The EM search
// uses the same comparisons on EM-only windows, and keeps a maximum whose EM
// ring (W4_EM - W2_EM) and hadronic E_T behind it (W2_HD) are below
// programmable limits.  Tau: a jet maximum with 16*W2 >= tau_ratio*W4.
//
// Choices of this design: the EM window size (2x2) and comparison pattern,
// the form of the isolation, hadronic and tau tests, and doing these three
// final tests in parallel on the deserialized sums rather than bit-serially.
// Sums that exceed 12 bits saturate.
//
// Timing: em/hd carry the bit-serial tower E_T, framed by sof (bit 0) and eof
// (bit 11).  res_valid pulses 7 clocks after the eof of the input frame;
// res then holds until the next pulse.
module sw_chip
  import l1cal_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            sof,
  input  logic                            eof,
  input  logic [SW_REG-1:0][SW_REG-1:0]   em,   // [eta][phi] serial bits
  input  logic [SW_REG-1:0][SW_REG-1:0]   hd,
  input  sw_cfg_t                         cfg,
  output logic                            res_valid,
  output win_result_t [SW_WIN*SW_WIN-1:0] res
);
  localparam int R  = SW_REG;      // 9 towers
  localparam int NW = R - 1;       // 8 window positions per axis

  // ---------------------------------------------------- stage framing
  logic [6:0] sof_s, eof_s;
  assign sof_s[0] = sof;
  assign eof_s[0] = eof;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sof_s[6:1] <= '0;
      eof_s[6:1] <= '0;
    end else begin
      sof_s[6:1] <= sof_s[5:0];
      eof_s[6:1] <= eof_s[5:0];
    end
  end

  // ---------------------------------------------------- s1: EM + HD
  logic [R-1:0][R-1:0] tot1, tot1_o, em1, hd1;

  always_ff @(posedge clk) begin
    em1 <= em;
    hd1 <= hd;
  end

  for (genvar i = 0; i < R; i++) begin : g_s1i
    for (genvar j = 0; j < R; j++) begin : g_s1j
      bs_add u_add (.clk, .sof(sof_s[0]), .eof(eof_s[0]),
                    .a(em[i][j]), .a_ovf(1'b0), .b(hd[i][j]), .b_ovf(1'b0),
                    .s(tot1[i][j]), .s_ovf(tot1_o[i][j]));
    end
  end

  // ---------------------------------------------------- s2, s3: 2x2 windows
  // index 0 = total, 1 = EM, 2 = HD
  logic [2:0][R-1:0][NW-1:0]  v2, v2_o;
  logic [2:0][NW-1:0][NW-1:0] w2, w2_o;
  logic [2:0][R-1:0][R-1:0]   t1, t1_o;

  assign t1[0] = tot1;  assign t1_o[0] = tot1_o;
  assign t1[1] = em1;   assign t1_o[1] = '0;
  assign t1[2] = hd1;   assign t1_o[2] = '0;

  for (genvar k = 0; k < 3; k++) begin : g_k
    for (genvar i = 0; i < R; i++) begin : g_v2i
      for (genvar j = 0; j < NW; j++) begin : g_v2j
        bs_add u_add (.clk, .sof(sof_s[1]), .eof(eof_s[1]),
                      .a(t1[k][i][j]),   .a_ovf(t1_o[k][i][j]),
                      .b(t1[k][i][j+1]), .b_ovf(t1_o[k][i][j+1]),
                      .s(v2[k][i][j]),   .s_ovf(v2_o[k][i][j]));
      end
    end
    for (genvar i = 0; i < NW; i++) begin : g_w2i
      for (genvar j = 0; j < NW; j++) begin : g_w2j
        bs_add u_add (.clk, .sof(sof_s[2]), .eof(eof_s[2]),
                      .a(v2[k][i][j]),   .a_ovf(v2_o[k][i][j]),
                      .b(v2[k][i+1][j]), .b_ovf(v2_o[k][i+1][j]),
                      .s(w2[k][i][j]),   .s_ovf(w2_o[k][i][j]));
      end
    end
  end

  // ---------------------------------------------------- local maxima (on s3)
  // kind 0 = jet (total E_T), 1 = EM
  logic [1:0][SW_WIN-1:0][SW_WIN-1:0][24:0] cmp_ok;
  logic [1:0][SW_WIN-1:0][SW_WIN-1:0]       lm;

  for (genvar k = 0; k < 2; k++) begin : g_lmk
    for (genvar a = 0; a < SW_WIN; a++) begin : g_lma
      for (genvar b = 0; b < SW_WIN; b++) begin : g_lmb
        for (genvar dx = -2; dx <= 2; dx++) begin : g_dx
          for (genvar dy = -2; dy <= 2; dy++) begin : g_dy
            localparam int N = (dx + 2) * 5 + (dy + 2);
            if (dx == 0 && dy == 0) begin : g_c
              assign cmp_ok[k][a][b][N] = 1'b1;
            end else begin : g_n
              logic gt, ge;
              bs_cmp u_cmp (.clk, .sof(sof_s[3]), .eof(eof_s[3]),
                            .a(w2[k][a+2][b+2]),       .a_ovf(w2_o[k][a+2][b+2]),
                            .b(w2[k][a+2+dx][b+2+dy]), .b_ovf(w2_o[k][a+2+dx][b+2+dy]),
                            .gt, .ge);
              assign cmp_ok[k][a][b][N] = lm_strict(dx, dy) ? gt : ge;
            end
          end
        end
        assign lm[k][a][b] = &cmp_ok[k][a][b];
      end
    end
  end

  // ---------------------------------------------------- s4, s5: 4x4 sums
  // h[k][p][q] = W2[p+1][q+1] + W2[p+3][q+1], p = 0..3, q = 0..5
  logic [1:0][SW_WIN-1:0][SW_WIN+1:0] h, h_o;
  logic [1:0][SW_WIN-1:0][SW_WIN-1:0] w4, w4_o;

  for (genvar k = 0; k < 2; k++) begin : g_w4k
    for (genvar p = 0; p < SW_WIN; p++) begin : g_hp
      for (genvar q = 0; q < SW_WIN + 2; q++) begin : g_hq
        bs_add u_add (.clk, .sof(sof_s[3]), .eof(eof_s[3]),
                      .a(w2[k][p+1][q+1]), .a_ovf(w2_o[k][p+1][q+1]),
                      .b(w2[k][p+3][q+1]), .b_ovf(w2_o[k][p+3][q+1]),
                      .s(h[k][p][q]),      .s_ovf(h_o[k][p][q]));
      end
      for (genvar q = 0; q < SW_WIN; q++) begin : g_w4q
        bs_add u_add (.clk, .sof(sof_s[4]), .eof(eof_s[4]),
                      .a(h[k][p][q]),   .a_ovf(h_o[k][p][q]),
                      .b(h[k][p][q+2]), .b_ovf(h_o[k][p][q+2]),
                      .s(w4[k][p][q]),  .s_ovf(w4_o[k][p][q]));
      end
    end
  end

  // ---------------------------------------------------- deserialize
  logic [2:0][SW_WIN-1:0][SW_WIN-1:0][BS_W-1:0] w2_val;
  logic [1:0][SW_WIN-1:0][SW_WIN-1:0][BS_W-1:0] w4_val;

  for (genvar a = 0; a < SW_WIN; a++) begin : g_da
    for (genvar b = 0; b < SW_WIN; b++) begin : g_db
      for (genvar k = 0; k < 3; k++) begin : g_d2
        bs_deser u_d2 (.clk, .eof(eof_s[3]), .d(w2[k][a+2][b+2]),
                       .ovf(w2_o[k][a+2][b+2]), .value(w2_val[k][a][b]));
      end
      for (genvar k = 0; k < 2; k++) begin : g_d4
        bs_deser u_d4 (.clk, .eof(eof_s[5]), .d(w4[k][a][b]),
                       .ovf(w4_o[k][a][b]), .value(w4_val[k][a][b]));
      end
    end
  end

  // ---------------------------------------------------- final tests
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= eof_s[6];
      if (eof_s[6]) begin
        for (int a = 0; a < SW_WIN; a++) begin
          for (int b = 0; b < SW_WIN; b++) begin
            res[a*SW_WIN+b].jet    <= lm[0][a][b];
            res[a*SW_WIN+b].jet_et <= w4_val[0][a][b];
            res[a*SW_WIN+b].tau    <= lm[0][a][b] &&
                (17'({w2_val[0][a][b], 4'b0}) >= 17'(w4_val[0][a][b]) * 17'(cfg.tau_ratio));
            res[a*SW_WIN+b].em     <= lm[1][a][b] &&
                ({1'b0, w4_val[1][a][b]} <= {1'b0, w2_val[1][a][b]} + {1'b0, cfg.em_iso_max}) &&
                (w2_val[2][a][b] <= cfg.em_had_max);
            res[a*SW_WIN+b].em_et  <= w2_val[1][a][b];
          end
        end
      end
    end
  end

endmodule
