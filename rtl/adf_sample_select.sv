// adf_sample_select: first down-sampler of an ADF channel.
//
// The ADC delivers four 10-bit samples per beam crossing (BC) at 4 x F_BC.
// This block keeps two of them, either samples 0 and 2 or samples 1 and 3 of
// each BC (sample_phase), which together with the ADC clock inversion lets
// the sampling instant be moved in steps of a quarter sample period.  In test
// mode the kept samples are replaced by a programmable sequence of up to
// TEST_DEPTH samples played in a loop, so the filter can be exercised without
// an analog signal.  The reduction 4 -> 2 samples per BC and the test-mode
// injection follow the system description; the loop length register and the
// depth of the test memory are choices of this design.
//
// Timing: adc_stb marks the clock cycles that carry an ADC sample and
// sample_idx (0..3) its position in the BC.  x_valid is registered: it rises
// one clock after the accepted strobe.  x_pair tells which of the two kept
// samples of the BC the output is (0 = first).
module adf_sample_select
  import l1cal_pkg::*;
#(
  parameter int DEPTH = TEST_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adc_stb,
  input  logic [1:0]        sample_idx,
  input  logic [ADC_W-1:0]  adc,
  input  logic              sample_phase,
  input  logic              test_mode,
  input  logic [$clog2(DEPTH)-1:0] test_len_m1,
  input  logic              test_we,
  input  logic [$clog2(DEPTH)-1:0] test_waddr,
  input  logic [ADC_W-1:0]  test_wdata,
  output logic              x_valid,
  output logic [ADC_W-1:0]  x,
  output logic              x_pair
);
  localparam int AW = $clog2(DEPTH);

  logic [ADC_W-1:0] test_mem [DEPTH];
  logic [AW-1:0]    tptr;
  logic             keep;

  assign keep = adc_stb && (sample_idx[0] == sample_phase);

  always_ff @(posedge clk) begin
    if (test_we) test_mem[test_waddr] <= test_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid <= 1'b0;
      x       <= '0;
      x_pair  <= 1'b0;
      tptr    <= '0;
    end else begin
      x_valid <= keep;
      if (keep) begin
        x      <= test_mode ? test_mem[tptr] : adc;
        x_pair <= sample_idx[1];
        if (test_mode) tptr <= (tptr == test_len_m1) ? '0 : tptr + 1'b1;
      end
      if (!test_mode) tptr <= '0;
    end
  end

endmodule
