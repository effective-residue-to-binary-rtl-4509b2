// crt_r2b_converter: residue-to-binary converter after the Chinese Remainder
// Theorem, with the excess factor estimated by a power of two.
//
// Input: the n residues |X|_mj of a number X in [0, M). Output: X in binary.
// The n projection ROMs (crt_proj_rom) give X_j; a carry-save tree
// (csa_tree) and a carry-look-ahead adder (cla_adder) form S = sum X_j.
// With M_B = 2^p close to M, the low p bits of S are X_B = |S|_MB and the
// high bits are r_B = floor(S / M_B), obtained without any division. The
// true excess factor r = floor(S/M) differs from r_B by rho in {0, 1}, so
//   case 1 (M < M_B, delta = M_B - M):  X = X_B + delta*r_B - rho*M
//   case 2 (M > M_B, delta = M - M_B):  X = X_B - delta*r_B + rho*M
// rb_delta_rom forms delta*r_B; a carry-save row (csa_3to2) and a second
// CLA form the M-corrected candidate (left adder), a third CLA forms the
// uncorrected one (right adder), and result_mux keeps the one in [0, M).
// In case 1 the select is the carry out of the left adder (X_B + delta*r_B
// >= M); in case 2, which has no left-adder carry to use, it is the carry
// out of the right adder, i.e. X_B >= delta*r_B. The case and p are picked
// at elaboration (crt_pkg): case 1 if (n-1)*M > (n-2)*M_B holds for
// M_B = 2^ceil(log2 M), else case 2 if n*M_B > (n-1)*M for the next lower
// power of two; a base meeting neither is rejected.
//
// Default base {32,31,29,27,19}: M = 14757984, M_B = 2^24, case 1.
// The datapath follows the converter's block diagram. This design adds: an
// optional register stage (PIPELINED = 1) after the ROMs, after the sum
// adder and at the output, giving a latency of 3 clock cycles and one
// result per cycle; with PIPELINED = 0 the converter is combinational from
// residues to x and out_valid = in_valid. The rho output (1 when the
// M-corrected candidate was taken) and the valid handshake are also this
// design's additions. Residues must be below their modulus; other codes
// read as residue 0 in the ROMs.
module crt_r2b_converter
  import crt_pkg::*;
#(
  parameter int unsigned N         = 5,
  parameter moduli_t     MODULI    = '{0: 32, 1: 31, 2: 29, 3: 27, 4: 19, default: 0},
  parameter bit          PIPELINED = 1'b0,
  localparam u64_t        PROD  = base_product(MODULI, N),
  localparam int unsigned AW    = clog2_u64(u64_t'(max_modulus(MODULI, N))),
  localparam int unsigned XW    = clog2_u64(PROD)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][AW-1:0] residues,
  output logic                out_valid,
  output logic [XW-1:0]       x,
  output logic                rho
);

  localparam bit          CASE1 = use_case1(PROD, N);
  localparam int unsigned P     = select_p(PROD, N);
  localparam u64_t        DELTA = select_delta(PROD, N);
  localparam int unsigned SUMW  = clog2_u64(u64_t'(N) * PROD);
  localparam int unsigned RBW   = SUMW - P;
  localparam int unsigned L     = XW + 1;
  // Third operand of the carry-save row: -M as 2^L - M (case 1), +M (case 2)
  localparam logic [L-1:0] KCONST = CASE1 ? L'((u64_t'(1) << L) - PROD) : L'(PROD);

  // ---- projections -------------------------------------------------------
  logic [N-1:0][SUMW-1:0] proj, proj_q;
  logic                   v0_q;

  for (genvar j = 0; j < N; j++) begin : g_rom
    crt_proj_rom #(
      .MODULUS(u64_t'(MODULI[j])),
      .PROD   (PROD),
      .AW     (AW),
      .W      (SUMW)
    ) u_rom (
      .residue(residues[j]),
      .proj   (proj[j])
    );
  end

  // ---- sum of projections ------------------------------------------------
  logic [SUMW-1:0] tree_s, tree_c, sum, sum_q;
  logic            sum_cout;
  logic            v1_q;

  csa_tree #(.N(N), .W(SUMW)) u_tree (
    .ops(proj_q),
    .s  (tree_s),
    .c  (tree_c)
  );

  cla_adder #(.W(SUMW)) u_sum_cla (
    .a   (tree_s),
    .b   (tree_c),
    .cin (1'b0),
    .sum (sum),
    .cout(sum_cout)
  );

  // ---- modulo generation -------------------------------------------------
  logic [P-1:0]   xb;
  logic [RBW-1:0] rb;
  logic [L-1:0]   xb_ext, drb, row_s, row_c;
  logic [L:0]     left_sum;
  logic [L-1:0]   right_sum;
  logic           right_cout, left_cout, left_carry, sel;
  logic [XW-1:0]  x_d;

  assign xb     = sum_q[P-1:0];
  assign rb     = sum_q[SUMW-1:P];
  assign xb_ext = L'(xb);

  rb_delta_rom #(
    .DELTA (DELTA),
    .NEGATE(!CASE1),
    .RBW   (RBW),
    .L     (L)
  ) u_rb_delta (
    .rb(rb),
    .d (drb)
  );

  csa_3to2 #(.W(L)) u_row (
    .a    (xb_ext),
    .b    (drb),
    .c    (KCONST),
    .sum  (row_s),
    .carry(row_c)
  );

  // Left adder: X_B -/+ delta*r_B -/+ M
  cla_adder #(.W(L + 1)) u_left_cla (
    .a   ({1'b0, row_s}),
    .b   ({row_c, 1'b0}),
    .cin (!CASE1),
    .sum (left_sum),
    .cout(left_cout)
  );

  // Right adder: X_B -/+ delta*r_B
  cla_adder #(.W(L)) u_right_cla (
    .a   (xb_ext),
    .b   (drb),
    .cin (!CASE1),
    .sum (right_sum),
    .cout(right_cout)
  );

  assign left_carry = left_sum[L];

  // Case 1: left carry set -> corrected value (rho = 1).
  // Case 2: right carry set -> uncorrected value (rho = 0).
  assign sel = CASE1 ? left_carry : !right_cout;

  result_mux #(.W(XW)) u_mux (
    .sel(sel),
    .in0(right_sum[XW-1:0]),
    .in1(left_sum[XW-1:0]),
    .y  (x_d)
  );

  // ---- optional pipeline registers ----------------------------------------
  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v0_q      <= 1'b0;
        v1_q      <= 1'b0;
        out_valid <= 1'b0;
      end else begin
        v0_q      <= in_valid;
        v1_q      <= v0_q;
        out_valid <= v1_q;
      end
    end
    always_ff @(posedge clk) begin
      proj_q <= proj;
      sum_q  <= sum;
      x      <= x_d;
      rho    <= sel;
    end
  end else begin : g_comb
    assign v0_q      = in_valid;
    assign v1_q      = v0_q;
    assign out_valid = v1_q;
    assign proj_q    = proj;
    assign sum_q     = sum;
    assign x         = x_d;
    assign rho       = sel;
  end

  // ---- elaboration checks --------------------------------------------------
  initial begin
    assert (N >= 2 && N <= MAX_N) else $error("crt_r2b_converter: N out of range");
    assert (use_case1(PROD, N) || use_case2(PROD, N))
      else $error("crt_r2b_converter: no M_B = 2^p keeps rho <= 1 for this base");
  end

  // The sum of projections never reaches n*M, so the sum adder cannot carry out.
  always_comb begin
    if (in_valid) assert (!sum_cout || PIPELINED) else $error("sum adder overflow");
  end

endmodule
