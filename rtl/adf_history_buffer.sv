// adf_history_buffer: circular history buffer of an ADF channel.
//
// Records every written word in a DEPTH-deep (512) circular memory so the
// recent past of a signal can be read back for debugging and monitoring.
// While freeze is high nothing is written, so the contents seen at the moment
// of a trigger are kept until the buffer is released.  The depth and the
// freeze follow the system description; the addressing is a choice of this
// design: both read ports take a "back" offset, 0 being the newest word.
//
// Timing: port A (slow-control read-back) and port B (raw readout after a
// level-1 accept) have registered outputs, valid one clock after the offset
// is presented; a read in the same cycle as a write uses the pointer before
// that write.
module adf_history_buffer
  import l1cal_pkg::*;
#(
  parameter int W     = 16,
  parameter int DEPTH = HIST_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [W-1:0]             wdata,
  input  logic                     freeze,
  input  logic [$clog2(DEPTH)-1:0] back_a,
  output logic [W-1:0]             rdata_a,
  input  logic [$clog2(DEPTH)-1:0] back_b,
  output logic [W-1:0]             rdata_b
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr;

  always_ff @(posedge clk) begin
    if (we && !freeze) mem[wptr] <= wdata;
    rdata_a <= mem[wptr - 1'b1 - back_a];
    rdata_b <= mem[wptr - 1'b1 - back_b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              wptr <= '0;
    else if (we && !freeze)  wptr <= wptr + 1'b1;
  end

endmodule
