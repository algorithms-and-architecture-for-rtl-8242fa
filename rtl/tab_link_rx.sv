// tab_link_rx: receiving end of one ADF-to-TAB link.
//
// The ADF card and the TAB run on different clocks (8 x and 12 x the beam
// crossing frequency), both locked to the beam crossing.  A frame stays on
// the link for a whole crossing and carries a toggle bit that flips with
// every new frame.  The receiver synchronizes the toggle through two flip-
// flops, and when it sees it change captures the frame, which has been
// stable for at least two TAB clocks by then.  The physical link (a Channel
// Link serializer pair in the system description) is outside this block;
// the toggle handshake is a choice of this design.
//
// Timing: new_frame pulses for one clock when word/kind hold a new frame,
// 3 to 4 TAB clocks after the frame changed on the link.
module tab_link_rx
  import l1cal_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  link_frame_t                  link,
  output logic                         new_frame,
  output out_mode_e                    kind,
  output logic [ADF_CH-1:0][ET_W-1:0]  word
);
  logic [2:0] tog;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tog       <= '0;
      new_frame <= 1'b0;
      kind      <= OUT_FILTERED;
      word      <= '0;
    end else begin
      tog       <= {tog[1:0], link.toggle};
      new_frame <= tog[2] ^ tog[1];
      if (tog[2] ^ tog[1]) begin
        kind <= link.kind;
        word <= link.word;
      end
    end
  end

endmodule
