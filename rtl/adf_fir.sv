// adf_fir: finite-impulse-response filter of one ADF channel.
//
// Runs at 2 x F_BC on the samples kept by adf_sample_select.  Up to
// FIR_TAPS = 8 taps with signed 6-bit coefficients (a shorter response is
// obtained by zeroing coefficients), as in the system description.  The
// unsigned 10-bit input is treated as a non-negative number; products and the
// sum are kept at full width and the result is saturated to a signed 16-bit
// value, the output width of the filter stage.  Saturation, the coefficient
// encoding (two's complement) and the output alignment are choices of this
// design.
//
// Timing: x_valid shifts a sample into the delay line; y_valid follows two
// clocks later with y = sum_k coef[k] * x[n-k], k = 0 being the newest sample.
module adf_fir
  import l1cal_pkg::*;
#(
  parameter int TAPS = FIR_TAPS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            x_valid,
  input  logic [ADC_W-1:0]                x,
  input  logic                            x_pair,
  input  logic signed [TAPS-1:0][COEF_W-1:0] coef,
  output logic                            y_valid,
  output logic signed [FIR_W-1:0]         y,
  output logic                            y_pair
);
  localparam int ACC_W = ADC_W + 1 + COEF_W + $clog2(TAPS) + 1;

  logic [TAPS-1:0][ADC_W-1:0] taps;
  logic                       pend, pend_pair;
  logic signed [ACC_W-1:0]    acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++)
      acc += ACC_W'($signed({1'b0, taps[k]}) * $signed(coef[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taps      <= '0;
      pend      <= 1'b0;
      pend_pair <= 1'b0;
      y_valid   <= 1'b0;
      y         <= '0;
      y_pair    <= 1'b0;
    end else begin
      pend <= x_valid;
      if (x_valid) begin
        taps      <= {taps[TAPS-2:0], x};
        pend_pair <= x_pair;
      end
      y_valid <= pend;
      if (pend) begin
        y_pair <= pend_pair;
        if (acc > ACC_W'(2**(FIR_W-1) - 1))
          y <= FIR_W'(2**(FIR_W-1) - 1);
        else if (acc < -ACC_W'(2**(FIR_W-1)))
          y <= {1'b1, {(FIR_W-1){1'b0}}};
        else
          y <= FIR_W'(acc);
      end
    end
  end

endmodule
