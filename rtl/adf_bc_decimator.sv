// adf_bc_decimator: second down-sampler and scaler of an ADF channel.
//
// The peak detector delivers two results per beam crossing; only the one
// whose position in the crossing equals dec_phase is kept, giving one value
// per crossing.  The kept value is scaled by a programmable right shift and
// saturated to 10 bits to address the E_T lookup table.  Down-sampling by two
// and scaling to a 10-bit table address follow the system description; the
// phase select, the shift-based scaling and the saturation are choices of
// this design.
//
// Timing: a_valid and addr are registered, one clock after the kept p_valid.
module adf_bc_decimator
  import l1cal_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              p_valid,
  input  logic [FIR_W-1:0]  p,
  input  logic              p_pair,
  input  logic              dec_phase,
  input  logic [3:0]        scale_shift,
  output logic              a_valid,
  output logic [LUT_AW-1:0] addr
);
  logic [FIR_W-1:0] scaled;

  assign scaled = p >> scale_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      addr    <= '0;
    end else begin
      a_valid <= p_valid && (p_pair == dec_phase);
      if (p_valid && (p_pair == dec_phase))
        addr <= (scaled > FIR_W'(2**LUT_AW - 1)) ? '1 : LUT_AW'(scaled);
    end
  end

endmodule
