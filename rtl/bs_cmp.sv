// bs_cmp: bit-serial magnitude comparator.
//
// Compares two unsigned words that arrive least significant bit first
// (sof = bit 0, eof = last bit).  A running state remembers whether a was
// greater than b or equal to it over the bits seen so far; a higher bit that
// differs overrides it.  In the eof cycle the decision is completed, taking
// the overflow flags into account (an overflowed word counts as the largest
// value, two overflowed words as equal), and registered: gt (a > b) and
// ge (a >= b) are valid from the clock after eof until the next eof.
module bs_cmp (
  input  logic clk,
  input  logic sof,
  input  logic eof,
  input  logic a,
  input  logic a_ovf,
  input  logic b,
  input  logic b_ovf,
  output logic gt,
  output logic ge
);
  logic g_q, e_q, g_prev, e_prev, g_cur, e_cur;

  assign g_prev = sof ? 1'b0 : g_q;
  assign e_prev = sof ? 1'b1 : e_q;
  assign g_cur  = (a & ~b) | (~(a ^ b) & g_prev);
  assign e_cur  = ~(a ^ b) & e_prev;

  always_ff @(posedge clk) begin
    g_q <= g_cur;
    e_q <= e_cur;
    if (eof) begin
      if (a_ovf || b_ovf) begin
        gt <= a_ovf && !b_ovf;
        ge <= a_ovf;
      end else begin
        gt <= g_cur;
        ge <= g_cur | e_cur;
      end
    end
  end

endmodule
