// l1cal_pkg: sizes, types and helper functions shared by the level-1
// calorimeter trigger RTL.
//
// The numbers that describe the system (10-bit ADC, 8-tap FIR with 6-bit
// coefficients, 1024x8 E_T table, 512-word history buffers, 32 channels per
// ADF card, 80 ADF cards, 8 TABs, 10 sliding-windows chips per TAB with 16
// windows each, 12-bit bit-serial arithmetic, 64 trigger decisions) follow the
// system description.  The configuration bus, the register map, the link frame
// layout and the TAB/GAB result formats are choices of this implementation.
package l1cal_pkg;

  // ---------------------------------------------------------------- ADF side
  localparam int ADC_W      = 10;   // ADC resolution
  localparam int FIR_TAPS   = 8;    // maximum number of FIR taps
  localparam int COEF_W     = 6;    // signed FIR coefficient width
  localparam int FIR_W      = 16;   // FIR / peak detector output width
  localparam int LUT_AW     = 10;   // E_T lookup table address width
  localparam int ET_W       = 8;    // calibrated tower E_T width
  localparam int HIST_DEPTH = 512;  // history buffer depth
  localparam int HIST_AW    = 9;
  localparam int ADF_CH     = 32;   // analog channels per ADF card
  localparam int TEST_DEPTH = 64;   // test-mode sample memory per channel
  localparam int PED_W      = 8;    // pedestal DAC code width

  // Geometry of the calorimeter trigger tower array (eta x phi).
  localparam int N_ETA      = 40;
  localparam int N_PHI      = 32;
  localparam int ADF_ETA    = 4;    // towers per ADF card in eta
  localparam int ADF_PHI    = 4;    // towers per ADF card in phi
  localparam int N_ADF_ETA  = N_ETA / ADF_ETA;   // 10
  localparam int N_ADF_PHI  = N_PHI / ADF_PHI;   // 8
  localparam int N_ADF      = N_ADF_ETA * N_ADF_PHI;  // 80
  localparam int N_TAB      = 8;
  localparam int TAB_LINKS  = 3 * N_ADF_ETA;     // 30 cables per TAB
  localparam int TAB_PHI    = 3 * ADF_PHI;       // 12 phi columns seen by a TAB

  // ---------------------------------------------------------------- TAB side
  localparam int BS_W       = 12;   // bit-serial word length = clocks per BC
  localparam int SW_CHIPS   = 10;   // sliding-windows chips per TAB
  localparam int SW_WIN     = 4;    // candidate windows per chip per axis (4x4=16)
  localparam int SW_REG     = SW_WIN + 5;        // 9x9 towers needed by a chip
  localparam int N_THR      = 4;    // E_T thresholds per object type
  localparam int CNT_W      = 8;    // object count width
  localparam int SUM_W      = 16;   // scalar E_T sum width per TAB
  localparam int EXY_W      = 26;   // signed Ex/Ey width per TAB (Q7 weights)
  localparam int N_TRIG     = 64;   // GAB trigger decisions

  // ------------------------------------------------------- ADF configuration
  typedef enum logic [3:0] {
    REG_COEF     = 4'd0,  // idx 0..7  : FIR coefficient (signed, data[5:0])
    REG_LUT      = 4'd1,  // idx 0..1023: E_T table entry (data[7:0])
    REG_CTRL     = 4'd2,  // channel control word, see chan_ctrl_t
    REG_PED      = 4'd3,  // pedestal DAC code (data[7:0])
    REG_TEST     = 4'd4,  // idx 0..63 : test-mode sample (data[9:0])
    REG_CARD     = 4'd5,  // card register idx, see card_reg_e
    REG_HIST_RAW = 4'd6,  // read: raw ADC history, idx = samples back from newest
    REG_HIST_FIR = 4'd7,  // read: FIR output history
    REG_HIST_ET  = 4'd8,  // read: E_T history
    REG_SWTRIG   = 4'd9   // write: software trigger (freezes history buffers)
  } cfg_reg_e;

  typedef enum logic [2:0] {
    CARD_OUT_MODE = 3'd0, // data[1:0] out_mode_e
    CARD_CONST    = 3'd1, // data[7:0] constant sent in OUT_CONST mode
    CARD_RAW_L1A  = 3'd2, // data[8] enable, data[6:0] number of raw samples
    CARD_FREEZE   = 3'd3, // data[0] freeze history buffers on L1 accept
    CARD_UNFREEZE = 3'd4, // write: resume history recording
    CARD_L1_LAT   = 3'd5  // data[8:0] L1 latency in ADC samples
  } card_reg_e;

  typedef enum logic [1:0] {
    OUT_FILTERED = 2'd0,
    OUT_RAW      = 2'd1,
    OUT_PRBS     = 2'd2,
    OUT_CONST    = 2'd3
  } out_mode_e;

  typedef struct packed {
    logic        wr;
    logic        rd;
    logic        card_bcast;   // address all cards
    logic [6:0]  card;
    logic        chan_bcast;   // address all channels of the card
    logic [4:0]  chan;
    cfg_reg_e    rsel;
    logic [9:0]  idx;
    logic [15:0] data;
  } cfg_req_t;

  typedef struct packed {
    logic [1:0] test_len_hi;   // unused upper bits
    logic [5:0] test_len_m1;   // test sequence length - 1
    logic       test_mode;     // feed test samples to the FIR
    logic       dec_phase;     // which of the two peak results per BC is kept
    logic [3:0] scale_shift;   // right shift before the E_T table
    logic       adc_clk_inv;   // drives the ADC clock inversion
    logic       sample_phase;  // keep ADC samples 0,2 (0) or 1,3 (1) of each BC
  } chan_ctrl_t;

  // One ADF output link, one frame per beam crossing.
  typedef struct packed {
    logic                          toggle;  // flips with every new frame
    out_mode_e                     kind;    // what the words carry
    logic [ADF_CH-1:0][ET_W-1:0]   word;
  } link_frame_t;

  // ------------------------------------------------------ TAB/GAB data types
  typedef struct packed {
    logic            jet;      // jet local maximum
    logic [BS_W-1:0] jet_et;   // 4x4 E_T of the window (EM+HD)
    logic            tau;      // narrow jet
    logic            em;       // isolated EM local maximum
    logic [BS_W-1:0] em_et;    // 2x2 EM E_T
  } win_result_t;

  typedef struct packed {
    logic [BS_W-1:0] em_iso_max;   // largest EM E_T allowed in the ring
    logic [BS_W-1:0] em_had_max;   // largest HD E_T allowed behind the window
    logic [4:0]      tau_ratio;    // tau if 16*E_T(2x2) >= tau_ratio*E_T(4x4)
  } sw_cfg_t;

  typedef struct packed {
    sw_cfg_t                     sw;
    logic [N_THR-1:0][BS_W-1:0]  jet_thr;
    logic [N_THR-1:0][BS_W-1:0]  em_thr;
    logic [N_THR-1:0][BS_W-1:0]  tau_thr;
  } tab_cfg_t;

  typedef struct packed {
    logic [N_THR-1:0][CNT_W-1:0] jet_cnt;
    logic [N_THR-1:0][CNT_W-1:0] em_cnt;
    logic [N_THR-1:0][CNT_W-1:0] tau_cnt;
    logic [SUM_W-1:0]            sum_et;
    logic signed [EXY_W-1:0]     ex;
    logic signed [EXY_W-1:0]     ey;
  } tab_result_t;

  // GAB trigger definition: source 0-3 jet counts, 4-7 EM counts,
  // 8-11 tau counts, 12 scalar E_T sum, 13 missing E_T.
  typedef struct packed {
    logic        en;
    logic [3:0]  src;
    logic [15:0] thr;
  } trig_def_t;

  // cos(2*pi*(k+0.5)/32) of phi bin k in Q7: round(128*cos(...)) for
  // k = 0..7; the other 24 phi bins follow by symmetry.
  function automatic int cos_q7(input int k);
    int t[8] = '{127, 122, 113, 99, 81, 60, 37, 13};
    int r, q;
    r = k % 8;
    q = (k / 8) % 4;
    case (q)
      0: return  t[r];
      1: return -t[7-r];
      2: return -t[r];
      default: return t[7-r];
    endcase
  endfunction

  function automatic int sin_q7(input int k);
    return cos_q7((k + 24) % 32);
  endfunction

  // Comparison rule of the local-maximum search: the central 2x2 window must
  // be strictly larger than the neighbour at (deta, dphi) when this returns
  // 1, and larger or equal otherwise.
  function automatic logic lm_strict(input int deta, input int dphi);
    return (dphi > 0 && deta > -2) || (dphi == 0 && deta > 0) ||
           (dphi < 0 && deta == 2);
  endfunction

endpackage
