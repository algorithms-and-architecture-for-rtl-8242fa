// adf_et_lut: calibration lookup table of an ADF channel.
//
// A 2**LUT_AW x ET_W (1024 x 8) memory that maps the scaled peak value to the
// final calibrated transverse energy of the trigger tower, as in the system
// description.  It is loaded through a write port from the configuration bus;
// its contents are not reset.
//
// Timing: a lookup requested with a_valid/addr returns et with et_valid one
// clock later (registered read).  et holds its value until the next lookup.
module adf_et_lut
  import l1cal_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [LUT_AW-1:0] waddr,
  input  logic [ET_W-1:0]   wdata,
  input  logic              a_valid,
  input  logic [LUT_AW-1:0] addr,
  output logic              et_valid,
  output logic [ET_W-1:0]   et
);
  logic [ET_W-1:0] mem [2**LUT_AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      et_valid <= 1'b0;
      et       <= '0;
    end else begin
      et_valid <= a_valid;
      if (a_valid) et <= mem[addr];
    end
  end

endmodule
