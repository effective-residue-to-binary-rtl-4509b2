// csa_3to2: one carry-save adder row (W full adders in parallel).
//
// Reduces three W-bit operands to a sum vector and a carry vector with
// a + b + c = sum + 2*carry exactly; no carry propagates between bit
// positions, so the delay is that of one full adder whatever W is.
// The carry vector is returned unshifted (bit i has weight 2^(i+1)), so the
// caller decides whether its top bit is kept or dropped. The converter uses
// this row as the carry-save adder in front of its M-correcting adder and as
// the building block of the n-operand tree; the row itself is the standard
// full-adder array.
// Timing: purely combinational.
module csa_3to2 #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end

endmodule
