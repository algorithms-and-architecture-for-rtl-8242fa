// bs_deser: converts a bit-serial word (least significant bit first,
// sof/eof framed) back to a parallel BS_W-bit value, saturating to all ones
// when the stream's overflow flag is set.  value is registered at eof and
// holds until the next eof.
module bs_deser
  import l1cal_pkg::*;
(
  input  logic            clk,
  input  logic            eof,
  input  logic            d,
  input  logic            ovf,
  output logic [BS_W-1:0] value
);
  logic [BS_W-1:0] sr;

  always_ff @(posedge clk) begin
    sr <= {d, sr[BS_W-1:1]};
    if (eof) value <= ovf ? '1 : {d, sr[BS_W-1:1]};
  end

endmodule
