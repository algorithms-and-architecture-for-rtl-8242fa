// adf_channel: digital signal processing of one calorimeter trigger pickoff
// channel, as on the ADF card.
//
// Chain (per the system description): 10-bit ADC at 4 x F_BC -> keep 2 of 4
// samples -> 8-tap FIR at 2 x F_BC -> 3-point peak detector -> keep 1 of 2
// results -> scale -> 1024 x 8 E_T lookup table, one 8-bit tower E_T per beam
// crossing.  Three 512-word history buffers record the raw ADC samples, the
// FIR outputs and the final E_T values.  The channel also holds its pedestal
// DAC code and the ADC clock inversion bit, which leave as ports towards the
// analog section.
//
// Configuration writes arrive already decoded for this channel (cfg_we with
// register, index and data, see l1cal_pkg).  Register layout, reset values
// (all coefficients zero, control word zero) and the history addressing are
// choices of this design.
//
// Timing: clk runs at 8 x F_BC.  adc_stb/sample_idx come from the card's BC
// phase counter.  From an accepted ADC sample to et_valid: 1 (select) + 2 (FIR)
// + 1 (peak) + 1 (decimate) + 1 (table) clocks, plus the one FIR input period
// (4 clocks) the peak detector waits for the following sample.
module adf_channel
  import l1cal_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adc_stb,
  input  logic [1:0]         sample_idx,
  input  logic [ADC_W-1:0]   adc,
  // decoded configuration write
  input  logic               cfg_we,
  input  cfg_reg_e           cfg_reg,
  input  logic [9:0]         cfg_idx,
  input  logic [15:0]        cfg_data,
  // to the analog section
  output logic               adc_clk_inv,
  output logic [PED_W-1:0]   ped_code,
  // results
  output logic               et_valid,
  output logic [ET_W-1:0]    et,
  // history buffers
  input  logic               freeze,
  input  cfg_reg_e           hist_sel,
  input  logic [HIST_AW-1:0] hist_back,
  output logic [15:0]        hist_rdata,
  input  logic [HIST_AW-1:0] raw_back,
  output logic [ADC_W-1:0]   raw_rdata
);
  chan_ctrl_t                            ctrl;
  logic signed [FIR_TAPS-1:0][COEF_W-1:0] coef;

  logic                    x_valid, x_pair;
  logic [ADC_W-1:0]        x;
  logic                    y_valid, y_pair;
  logic signed [FIR_W-1:0] y;
  logic                    p_valid, p_pair;
  logic [FIR_W-1:0]        p;
  logic                    a_valid;
  logic [LUT_AW-1:0]       addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl     <= '0;
      coef     <= '0;
      ped_code <= '0;
    end else if (cfg_we) begin
      case (cfg_reg)
        REG_CTRL: ctrl <= chan_ctrl_t'(cfg_data);
        REG_COEF: coef[cfg_idx[2:0]] <= cfg_data[COEF_W-1:0];
        REG_PED:  ped_code <= cfg_data[PED_W-1:0];
        default: ;
      endcase
    end
  end

  assign adc_clk_inv = ctrl.adc_clk_inv;

  adf_sample_select u_sel (
    .clk, .rst_n, .adc_stb, .sample_idx, .adc,
    .sample_phase (ctrl.sample_phase),
    .test_mode    (ctrl.test_mode),
    .test_len_m1  (ctrl.test_len_m1),
    .test_we      (cfg_we && cfg_reg == REG_TEST),
    .test_waddr   (cfg_idx[5:0]),
    .test_wdata   (cfg_data[ADC_W-1:0]),
    .x_valid, .x, .x_pair
  );

  adf_fir u_fir (
    .clk, .rst_n, .x_valid, .x, .x_pair, .coef,
    .y_valid, .y, .y_pair
  );

  adf_peak_detector u_peak (
    .clk, .rst_n, .y_valid, .y, .y_pair,
    .p_valid, .p, .p_pair
  );

  adf_bc_decimator u_dec (
    .clk, .rst_n, .p_valid, .p, .p_pair,
    .dec_phase   (ctrl.dec_phase),
    .scale_shift (ctrl.scale_shift),
    .a_valid, .addr
  );

  adf_et_lut u_lut (
    .clk, .rst_n,
    .we    (cfg_we && cfg_reg == REG_LUT),
    .waddr (cfg_idx),
    .wdata (cfg_data[ET_W-1:0]),
    .a_valid, .addr, .et_valid, .et
  );

  // ---------------------------------------------------------- history buffers
  logic [ADC_W-1:0] raw_a;
  logic [FIR_W-1:0] fir_a, fir_b_unused;
  logic [ET_W-1:0]  et_a, et_b_unused;
  cfg_reg_e         hist_sel_q;

  adf_history_buffer #(.W(ADC_W)) u_hraw (
    .clk, .rst_n, .we(adc_stb), .wdata(adc), .freeze,
    .back_a(hist_back), .rdata_a(raw_a), .back_b(raw_back), .rdata_b(raw_rdata)
  );

  adf_history_buffer #(.W(FIR_W)) u_hfir (
    .clk, .rst_n, .we(y_valid), .wdata(y), .freeze,
    .back_a(hist_back), .rdata_a(fir_a), .back_b('0), .rdata_b(fir_b_unused)
  );

  adf_history_buffer #(.W(ET_W)) u_het (
    .clk, .rst_n, .we(et_valid), .wdata(et), .freeze,
    .back_a(hist_back), .rdata_a(et_a), .back_b('0), .rdata_b(et_b_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist_sel_q <= REG_HIST_RAW;
    else        hist_sel_q <= hist_sel;
  end

  always_comb begin
    case (hist_sel_q)
      REG_HIST_FIR: hist_rdata = fir_a;
      REG_HIST_ET:  hist_rdata = 16'(et_a);
      default:      hist_rdata = 16'(raw_a);
    endcase
  end

endmodule
