// rb_delta_rom: the "x delta" block, a small constant multiplier.
//
// Multiplies the estimated excess factor r_B (RBW bits, at most a handful)
// by the constant delta = |M_B - M| and returns an L-bit operand for the
// correction adders. For M < M_B (NEGATE = 0) it returns delta*r_B; for
// M > M_B (NEGATE = 1) it returns the one's complement ~(delta*r_B), so that
// an adder with carry-in 1 subtracts delta*r_B. Because r_B has only a few
// bits, the product is a 2^RBW-entry constant table built at elaboration;
// it synthesises to RBW-variable logic functions, one per output bit.
// Timing: purely combinational.
module rb_delta_rom
  import crt_pkg::*;
#(
  parameter u64_t        DELTA  = 2019232,  // 2^24 - 14757984
  parameter bit          NEGATE = 1'b0,
  parameter int unsigned RBW    = 3,
  parameter int unsigned L      = 25
) (
  input  logic [RBW-1:0] rb,
  output logic [L-1:0]   d
);

  localparam int unsigned DEPTH = 1 << RBW;

  logic [L-1:0] rom [DEPTH];

  for (genvar r = 0; r < DEPTH; r++) begin : g_rom
    localparam logic [L-1:0] PRODUCT = L'(DELTA * u64_t'(r));
    assign rom[r] = NEGATE ? ~PRODUCT : PRODUCT;
  end

  assign d = rom[rb];

endmodule
