// tb_crt_r2b_full: the converter at its default configuration (base
// {32,31,29,27,19}, M = 14757984, combinational) swept over its whole
// number range. Every X in [0, M) is turned into its five residues; the
// output must equal X. Also counts the conversions that needed the
// correction rho = 1 and compares that count with the one obtained by
// direct reference arithmetic: rho = floor(S/M) - floor(S/2^24) where S is
// the sum of the projections.
module tb_crt_r2b_full;
  import crt_pkg::*;

  localparam u64_t M = 64'd14757984;
  localparam int unsigned MOD [5] = '{32, 31, 29, 27, 19};

  int checks = 0;
  int failures = 0;
  longint rho_dut = 0;
  longint rho_ref = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic [4:0][4:0] res;
  logic        out_valid, rho;
  logic [23:0] x;

  crt_r2b_converter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .residues(res),
    .out_valid(out_valid), .x(x), .rho(rho));

  // Projection weights: the multiple of M/m_j that is 1 modulo m_j, found by
  // search (independent of the design's table construction).
  u64_t w [5];

  initial begin
    #(64'd200000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64_t s, mj, rj;
    for (int j = 0; j < 5; j++) begin
      mj = M / u64_t'(MOD[j]);
      w[j] = 0;
      for (u64_t k = 1; k < u64_t'(MOD[j]); k++) if ((mj * k) % u64_t'(MOD[j]) == 1) w[j] = mj * k;
    end
    for (u64_t v = 0; v < M; v++) begin
      s = 0;
      for (int j = 0; j < 5; j++) begin
        rj = v % u64_t'(MOD[j]);
        res[j] = 5'(rj);
        s += w[j] * rj % M;
      end
      #1;
      checks++;
      if (u64_t'(x) != v || !out_valid) begin
        failures++;
        if (failures < 20) $display("FAIL X=%0d got %0d", v, x);
      end
      rho_dut += longint'(rho);
      rho_ref += longint'(s / M - (s >> 24));
    end
    checks++;
    $display("rho = 1 in %0d of %0d conversions (reference %0d)", rho_dut, M, rho_ref);
    if (rho_dut != rho_ref || rho_dut == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
