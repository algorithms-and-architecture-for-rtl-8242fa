// bs_add: bit-serial adder with overflow tracking.
//
// Operands arrive least significant bit first, one bit per clock, BS_W = 12
// bits per word; sof marks bit 0 (clears the carry) and eof the last bit.
// The sum leaves one clock later in the same format.  Each stream carries an
// overflow flag that is only meaningful in its eof cycle: the output flag is
// set when an input flag is set or the carry out of the last bit is one, so a
// downstream deserializer or comparator can treat the word as saturated.
// Bit-serial 12-bit arithmetic follows the system description; the overflow
// flag is a choice of this design.
module bs_add (
  input  logic clk,
  input  logic sof,
  input  logic eof,
  input  logic a,
  input  logic a_ovf,
  input  logic b,
  input  logic b_ovf,
  output logic s,
  output logic s_ovf
);
  logic c, cin, cout;

  assign cin  = sof ? 1'b0 : c;
  assign cout = (a & b) | (a & cin) | (b & cin);

  always_ff @(posedge clk) begin
    s     <= a ^ b ^ cin;
    c     <= cout;
    s_ovf <= eof & (a_ovf | b_ovf | cout);
  end

endmodule
