// adf_peak_detector: three-point peak detector after the FIR filter.
//
// For every new filter output the previous one is the middle of a window of
// three consecutive samples.  If the middle sample is strictly greater than
// both neighbours it is passed on, otherwise zero is output; this is the rule
// of the system description.  Negative middle values are also output as zero
// so the result is an unsigned energy estimate (a choice of this design).
//
// Timing: one result per y_valid, registered (p_valid one clock after
// y_valid).  The result belongs to the sample received on the previous
// y_valid, and p_pair is that sample's position within its beam crossing.
module adf_peak_detector
  import l1cal_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    y_valid,
  input  logic signed [FIR_W-1:0] y,
  input  logic                    y_pair,
  output logic                    p_valid,
  output logic [FIR_W-1:0]        p,
  output logic                    p_pair
);
  logic signed [FIR_W-1:0] mid, old;
  logic                    mid_pair;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid      <= '0;
      old      <= '0;
      mid_pair <= 1'b0;
      p_valid  <= 1'b0;
      p        <= '0;
      p_pair   <= 1'b0;
    end else begin
      p_valid <= y_valid;
      if (y_valid) begin
        old      <= mid;
        mid      <= y;
        mid_pair <= y_pair;
        p_pair   <= mid_pair;
        p        <= (mid > y && mid > old && mid > 0) ? FIR_W'(mid) : '0;
      end
    end
  end

endmodule
