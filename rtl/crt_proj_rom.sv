// crt_proj_rom: orthogonal-projection look-up table of one RNS channel.
//
// Addressed by the residue x_j = |X|_mj, it returns the projection
// X_j = M_j * |M_j^-1 * x_j|_mj, with M = PROD and M_j = M / m_j, as a W-bit
// binary number. The sum of all n projections, reduced modulo M, is X.
// The table is built at elaboration from MODULUS and PROD (crt_pkg), so it
// needs no data file; it synthesises to a constant ROM (or logic).
// Its width W = ceil(log2(n*M)) follows the ROM size given for the
// converter (2^b x ceil(log nM)); the top bits are zero. Addresses at or
// above MODULUS are not residues and read as zero (this design's choice).
// Timing: purely combinational, one ROM access.
module crt_proj_rom
  import crt_pkg::*;
#(
  parameter u64_t        MODULUS = 32,        // m_j
  parameter u64_t        PROD    = 14757984,  // M of the base
  parameter int unsigned AW      = 5,         // residue width, ceil(log2 max m)
  parameter int unsigned W       = 27         // output width, ceil(log2 nM)
) (
  input  logic [AW-1:0] residue,
  output logic [W-1:0]  proj
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [W-1:0] rom [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_rom
    if (u64_t'(a) < MODULUS) begin : g_valid
      assign rom[a] = W'(projection(PROD, MODULUS, u64_t'(a)));
    end else begin : g_unused
      assign rom[a] = '0;
    end
  end

  assign proj = rom[residue];

  initial begin
    assert (mod_inverse(PROD / MODULUS, MODULUS) != 0 || MODULUS == 1)
      else $error("crt_proj_rom: modulus %0d is not coprime with M/m", MODULUS);
  end

endmodule
