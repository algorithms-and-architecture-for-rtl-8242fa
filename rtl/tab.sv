// tab: trigger algorithm board.
//
// One TAB covers a 4-tower-wide slice of the calorimeter in phi (all 40
// towers in eta).  It receives 30 ADF links: the 10 ADF cards of its own
// phi slice and those of the two neighbouring slices, i.e. 40 x 12 towers,
// EM and HD, so that every window of its slice can be compared with its
// neighbours.  The tower map is serialized, least significant bit first,
// into 12-bit words at 12 clocks per beam crossing and fanned out to ten
// sliding-windows chips, each handling 4 x 4 candidate windows (chip c: eta
// 4c..4c+3) with the 9 x 9 towers around them; towers beyond the eta ends
// of the calorimeter read as zero, phi wraps around.  The global chip then
// forms the board's outputs.  This organisation follows the system
// description.
//
// Choices of this design: the cable order (link 3*e + m carries the ADF card
// of eta block e and phi block TAB_ID-1+m), the channel order on a card
// (channels 0-15 EM, 16-31 HD, channel 4*eta + phi within the card's 4x4
// towers), and that frames not carrying filtered E_T (raw, pseudorandom or
// constant test data) enter the algorithms as zero.
//
// Timing: clk = 12 x F_BC.  bc_sync marks bit 0 of a beam crossing frame.
// Frames received during crossing n are serialized in crossing n+1; the
// board's outputs follow with out_valid 9 clocks after the end of that frame.
module tab
  import l1cal_pkg::*;
#(
  parameter int TAB_ID = 0
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     bc_sync,
  input  link_frame_t [TAB_LINKS-1:0]              link,
  input  tab_cfg_t                                 cfg,
  output logic                                     out_valid,
  output tab_result_t                              result,
  output logic [N_ETA-1:0][ADF_PHI-1:0]            jet_map,
  output logic [N_ETA-1:0][ADF_PHI-1:0]            em_map,
  output logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0]  l2_em,
  output logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0]  l2_hd
);
  // Simulation hint only: keep the board as one shared model so the 8 copies
  // in the full system do not each get their own flattened code.
  /* verilator no_inline_module */
  // ------------------------------------------------------------ receivers
  logic [TAB_LINKS-1:0]                           rx_new;
  out_mode_e [TAB_LINKS-1:0]                      rx_kind;
  logic [TAB_LINKS-1:0][ADF_CH-1:0][ET_W-1:0]     rx_word;

  for (genvar k = 0; k < TAB_LINKS; k++) begin : g_rx
    tab_link_rx u_rx (.clk, .rst_n, .link(link[k]), .new_frame(rx_new[k]),
                      .kind(rx_kind[k]), .word(rx_word[k]));
  end

  // ------------------------------------------------------------ frame timing
  logic [3:0] bit_q, bit_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  bit_q <= 4'd0;
    else if (bc_sync)            bit_q <= 4'd1;
    else if (bit_q == 4'(BS_W - 1)) bit_q <= 4'd0;
    else                         bit_q <= bit_q + 1'b1;
  end

  assign bit_now = bc_sync ? 4'd0 : bit_q;

  // ------------------------------------------------------------ tower map
  logic [N_ETA-1:0][TAB_PHI-1:0][ET_W-1:0] em_map_q, hd_map_q, em_prev, hd_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      em_map_q <= '0;
      hd_map_q <= '0;
      em_prev  <= '0;
      hd_prev  <= '0;
    end else if (bit_now == 4'(BS_W - 1)) begin
      em_prev <= em_map_q;
      hd_prev <= hd_map_q;
      for (int e = 0; e < N_ADF_ETA; e++) begin
        for (int m = 0; m < 3; m++) begin
          for (int t = 0; t < ADF_ETA * ADF_PHI; t++) begin
            logic ok;
            ok = (rx_kind[3*e+m] == OUT_FILTERED);
            em_map_q[ADF_ETA*e + t/ADF_PHI][ADF_PHI*m + t%ADF_PHI] <=
                ok ? rx_word[3*e+m][t] : '0;
            hd_map_q[ADF_ETA*e + t/ADF_PHI][ADF_PHI*m + t%ADF_PHI] <=
                ok ? rx_word[3*e+m][16+t] : '0;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ serializer
  logic sof, eof;
  logic [N_ETA-1:0][TAB_PHI-1:0] em_bit, hd_bit;

  assign sof = (bit_now == 4'd0);
  assign eof = (bit_now == 4'(BS_W - 1));

  always_comb begin
    for (int e = 0; e < N_ETA; e++) begin
      for (int p = 0; p < TAB_PHI; p++) begin
        em_bit[e][p] = (bit_now < 4'(ET_W)) ? em_map_q[e][p][bit_now[2:0]] : 1'b0;
        hd_bit[e][p] = (bit_now < 4'(ET_W)) ? hd_map_q[e][p][bit_now[2:0]] : 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ chips
  win_result_t [SW_CHIPS-1:0][SW_WIN*SW_WIN-1:0] res;
  logic [SW_CHIPS-1:0]                           res_valid;

  for (genvar c = 0; c < SW_CHIPS; c++) begin : g_chip
    logic [SW_REG-1:0][SW_REG-1:0] em_r, hd_r;
    for (genvar i = 0; i < SW_REG; i++) begin : g_i
      localparam int E = SW_WIN * c - 2 + i;
      for (genvar j = 0; j < SW_REG; j++) begin : g_j
        if (E >= 0 && E < N_ETA) begin : g_in
          assign em_r[i][j] = em_bit[E][ADF_PHI - 2 + j];
          assign hd_r[i][j] = hd_bit[E][ADF_PHI - 2 + j];
        end else begin : g_out
          assign em_r[i][j] = 1'b0;
          assign hd_r[i][j] = 1'b0;
        end
      end
    end
    sw_chip u_sw (.clk, .rst_n, .sof, .eof, .em(em_r), .hd(hd_r), .cfg(cfg.sw),
                  .res_valid(res_valid[c]), .res(res[c]));
  end

  // ------------------------------------------------------------ global chip
  logic [N_ETA-1:0][ADF_PHI-1:0][ET_W-1:0] own_em, own_hd;

  always_comb begin
    for (int e = 0; e < N_ETA; e++) begin
      for (int p = 0; p < ADF_PHI; p++) begin
        own_em[e][p] = em_prev[e][ADF_PHI + p];
        own_hd[e][p] = hd_prev[e][ADF_PHI + p];
      end
    end
  end

  tab_global #(.TAB_ID(TAB_ID)) u_glb (
    .clk, .rst_n, .in_valid(res_valid[0]), .res, .em(own_em), .hd(own_hd), .cfg,
    .out_valid, .result, .jet_map, .em_map, .l2_em, .l2_hd
  );

endmodule
