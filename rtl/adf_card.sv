// adf_card: digital section of one analog-to-digital conversion and filter
// (ADF) card: 32 channels, their control, and the output links.
//
// Each beam crossing (BC) the card sends one frame with the 32 8-bit channel
// words over three identical output links, so that the TABs needing the same
// towers each get a copy.  The frame normally carries the filtered E_T values;
// the card can instead send raw ADC data, a pseudorandom stream or a
// constant.  On a level-1 accept it can send, for a programmable number of
// crossings, the raw ADC samples of the triggering event taken from the raw
// history buffers, and then return to filtered data by itself.  It can also
// freeze all history buffers on a level-1 accept or a software trigger.
// These features follow the system description.
//
// Choices of this design: the configuration bus (cfg_req_t, with card and
// channel broadcast so that all cards can be loaded at once), the register
// map, raw data sent as the 8 most significant bits of each 10-bit sample,
// one raw sample per crossing, the 32-bit LFSR (taps 32,22,2,1, one step per
// BC, channel c sends byte c mod 4) and the frame "kind" field.
//
// Timing: clk = 8 x F_BC.  bc_sync marks phase 0 of a crossing; ADC samples
// are taken at phases 0, 2, 4 and 6.  The frame register is updated, and its
// toggle bit flipped, at phase 7.  Read requests (cfg.rd) return cfg_rdata
// with cfg_rvalid two clocks later.
// The card's bus address comes from card_id, wired from the crate slot.
module adf_card
  import l1cal_pkg::*;
(
  input  logic [6:0]                     card_id,
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           bc_sync,
  input  logic [ADF_CH-1:0][ADC_W-1:0]   adc,
  input  logic                           l1_accept,
  input  cfg_req_t                       cfg,
  output logic [15:0]                    cfg_rdata,
  output logic                           cfg_rvalid,
  output logic [ADF_CH-1:0]              adc_clk_inv,
  output logic [ADF_CH-1:0][PED_W-1:0]   ped_code,
  output link_frame_t [2:0]              link
);
  // Simulation hint only: keep the card as one shared model so the 80
  // copies in the full system do not each get their own flattened code.
  /* verilator no_inline_module */
  // ----------------------------------------------------------- BC phase
  logic [2:0] ph;
  logic       adc_stb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ph <= '0;
    else if (bc_sync) ph <= 3'd1;
    else              ph <= ph + 1'b1;
  end

  // bc_sync itself is phase 0
  logic [2:0] ph_now;
  assign ph_now  = bc_sync ? 3'd0 : ph;
  assign adc_stb = (ph_now[0] == 1'b0);

  // ---------------------------------------------------- configuration decode
  logic card_sel;
  assign card_sel = cfg.card_bcast || (cfg.card == card_id);

  out_mode_e          out_mode;
  logic [ET_W-1:0]    const_word;
  logic               raw_en;
  logic [6:0]         raw_num;
  logic               freeze_en;
  logic [HIST_AW-1:0] l1_lat;
  logic               frozen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_mode   <= OUT_FILTERED;
      const_word <= '0;
      raw_en     <= 1'b0;
      raw_num    <= '0;
      freeze_en  <= 1'b0;
      l1_lat     <= '0;
      frozen     <= 1'b0;
    end else begin
      if (cfg.wr && card_sel && cfg.rsel == REG_CARD) begin
        case (card_reg_e'(cfg.idx[2:0]))
          CARD_OUT_MODE: out_mode   <= out_mode_e'(cfg.data[1:0]);
          CARD_CONST:    const_word <= cfg.data[ET_W-1:0];
          CARD_RAW_L1A:  begin raw_en <= cfg.data[8]; raw_num <= cfg.data[6:0]; end
          CARD_FREEZE:   freeze_en  <= cfg.data[0];
          CARD_UNFREEZE: frozen     <= 1'b0;
          CARD_L1_LAT:   l1_lat     <= cfg.data[HIST_AW-1:0];
          default: ;
        endcase
      end
      if ((cfg.wr && card_sel && cfg.rsel == REG_SWTRIG) || (l1_accept && freeze_en))
        frozen <= 1'b1;
    end
  end

  // ------------------------------------------------------------- channels
  logic [ADF_CH-1:0][ET_W-1:0]  et;
  logic [ADF_CH-1:0]            et_valid;
  logic [ADF_CH-1:0][15:0]      hist_rdata;
  logic [ADF_CH-1:0][ADC_W-1:0] raw_rdata;
  logic [HIST_AW-1:0]           raw_back;
  logic [6:0]                   raw_left;

  for (genvar c = 0; c < ADF_CH; c++) begin : g_ch
    adf_channel u_ch (
      .clk, .rst_n, .adc_stb,
      .sample_idx  (ph_now[2:1]),
      .adc         (adc[c]),
      .cfg_we      (cfg.wr && card_sel && (cfg.chan_bcast || cfg.chan == 5'(c))),
      .cfg_reg     (cfg.rsel),
      .cfg_idx     (cfg.idx),
      .cfg_data    (cfg.data),
      .adc_clk_inv (adc_clk_inv[c]),
      .ped_code    (ped_code[c]),
      .et_valid    (et_valid[c]),
      .et          (et[c]),
      .freeze      (frozen),
      .hist_sel    (cfg.rsel),
      .hist_back   (cfg.idx[HIST_AW-1:0]),
      .hist_rdata  (hist_rdata[c]),
      .raw_back    ((raw_left != 0) ? raw_back : '0),
      .raw_rdata   (raw_rdata[c])
    );
  end

  // ------------------------------------------------------------ read-back
  logic       rd_q;
  logic [4:0] rd_chan_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q       <= 1'b0;
      rd_chan_q  <= '0;
      cfg_rvalid <= 1'b0;
      cfg_rdata  <= '0;
    end else begin
      rd_q       <= cfg.rd && (cfg.card == card_id);
      rd_chan_q  <= cfg.chan;
      cfg_rvalid <= rd_q;
      if (rd_q) cfg_rdata <= hist_rdata[rd_chan_q];
    end
  end

  // ------------------------------------------------------ output framing
  logic [31:0] lfsr;
  link_frame_t frame;
  logic        raw_write;

  assign raw_write = adc_stb && !frozen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr     <= 32'h1;
      frame    <= '0;
      raw_left <= '0;
      raw_back <= '0;
    end else begin
      // raw readout of the triggering event: raw_back is the distance of
      // the next sample to send from the newest sample in the buffer
      if (l1_accept && raw_en && raw_left == 0) begin
        raw_left <= raw_num;
        raw_back <= l1_lat + HIST_AW'(raw_write);
      end else begin
        raw_back <= raw_back + HIST_AW'(raw_write)
                    - HIST_AW'(ph_now == 3'd7 && raw_left != 0);
      end

      if (ph_now == 3'd7) begin
        lfsr         <= {lfsr[30:0], 1'b0} ^ (lfsr[31] ? 32'h0040_0003 : 32'h0);
        frame.toggle <= ~frame.toggle;
        if (raw_left != 0) begin
          raw_left   <= raw_left - 1'b1;
          frame.kind <= OUT_RAW;
        end else begin
          frame.kind <= out_mode;
        end
        for (int c = 0; c < ADF_CH; c++) begin
          if (raw_left != 0 || out_mode == OUT_RAW)
            frame.word[c] <= raw_rdata[c][ADC_W-1 -: ET_W];
          else if (out_mode == OUT_PRBS)
            frame.word[c] <= lfsr[8*(c%4) +: 8];
          else if (out_mode == OUT_CONST)
            frame.word[c] <= const_word;
          else
            frame.word[c] <= et[c];
        end
      end
    end
  end

  assign link = {3{frame}};

endmodule
