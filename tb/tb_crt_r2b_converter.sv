// tb_crt_r2b_converter: end-to-end test of the residue-to-binary converter.
//
// Four converters run side by side on the three evaluated bases:
//   B1 = {32,31,29,27,19}               M ~ 2^23.8, M_B = 2^24  (case 1)
//   B2 = {32,31,29,27,25,23,19}         M ~ 2^32.0, M_B = 2^33  (case 1)
//   B3 = {32,31,29,27,25,23,19,17,13,11,7} M ~ 2^47.0, M_B = 2^47 (case 2)
// plus B1 with the pipeline registers (latency 3 cycles, one result per
// cycle). Each cycle a fresh X in [0, M) is drawn per converter (with the
// range ends forced at the start), its residues are applied and the output
// must equal X. The test also counts how often each mechanism occurs: both
// values of the correction rho on every base, the case-2 datapath, and
// back-to-back results from the pipelined converter after exactly three
// cycles. A mechanism that never occurs counts as a failure.
module tb_crt_r2b_converter;
  import crt_pkg::*;

  localparam int unsigned NCYC = 100000;

  localparam moduli_t B1 = '{0: 32, 1: 31, 2: 29, 3: 27, 4: 19, default: 0};
  localparam moduli_t B2 = '{0: 32, 1: 31, 2: 29, 3: 27, 4: 25, 5: 23, 6: 19, default: 0};
  localparam moduli_t B3 = '{0: 32, 1: 31, 2: 29, 3: 27, 4: 25, 5: 23, 6: 19, 7: 17,
                             8: 13, 9: 11, 10: 7, default: 0};
  localparam u64_t M1 = 64'd14757984;
  localparam u64_t M2 = 64'd8485840800;
  localparam u64_t M3 = 64'd144403552893600;

  int checks = 0;
  int failures = 0;
  int rho_count [4][2];
  int pipe_results = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0][4:0]  r1, r1p;
  logic [6:0][4:0]  r2;
  logic [10:0][4:0] r3;
  logic [23:0] x1, x1p;
  logic [32:0] x2;
  logic [47:0] x3;
  logic v1, v2, v3, v1p, in_v1p;
  logic rho1, rho2, rho3, rho1p;

  crt_r2b_converter u_b1 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .residues(r1),
    .out_valid(v1), .x(x1), .rho(rho1));
  crt_r2b_converter #(.N(7), .MODULI(B2)) u_b2 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .residues(r2),
    .out_valid(v2), .x(x2), .rho(rho2));
  crt_r2b_converter #(.N(11), .MODULI(B3)) u_b3 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .residues(r3),
    .out_valid(v3), .x(x3), .rho(rho3));
  crt_r2b_converter #(.PIPELINED(1'b1)) u_b1p (
    .clk(clk), .rst_n(rst_n), .in_valid(in_v1p), .residues(r1p),
    .out_valid(v1p), .x(x1p), .rho(rho1p));

  function automatic u64_t rand_below(u64_t m);
    return {$urandom, $urandom} % m;
  endfunction

  // X for step i: the range ends first, then random values.
  function automatic u64_t pick(int i, u64_t m);
    if (i == 0) return 0;
    if (i == 1) return m - 1;
    if (i == 2) return 1;
    if (i == 3) return m / 2;
    return rand_below(m);
  endfunction

  task automatic check(string name, u64_t got, u64_t exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", name, got, exp);
    end
  endtask

  initial begin
    repeat (NCYC * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs of the pipelined converter, by issue cycle.
  u64_t pipe_exp [$];
  int   pipe_issue [$];
  int   cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Pipelined converter: check each result against its issue cycle. Inputs
  // applied before rising edge k are sampled there; the result must be
  // visible after edge k+2, i.e. when sampled at edge k+3.
  always @(posedge clk) begin
    if (rst_n && v1p) begin
      if (pipe_exp.size() == 0) begin
        checks++;
        failures++;
        $display("FAIL pipelined: result without input");
      end else begin
        check("pipelined x", u64_t'(x1p), pipe_exp.pop_front());
        checks++;
        if (cycle - pipe_issue.pop_front() != 3) begin
          failures++;
          $display("FAIL pipelined latency");
        end else begin
          pipe_results++;
        end
        rho_count[3][rho1p]++;
      end
    end
  end

  initial begin
    u64_t xa, xb, xc, xd;
    in_v1p = 1'b0;
    r1 = '0; r2 = '0; r3 = '0; r1p = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      @(negedge clk);
      xa = pick(i, M1);
      xb = pick(i, M2);
      xc = pick(i, M3);
      xd = pick(i + 1, M1);
      for (int j = 0; j < 5; j++)  r1[j] = 5'(xa % u64_t'(B1[j]));
      for (int j = 0; j < 7; j++)  r2[j] = 5'(xb % u64_t'(B2[j]));
      for (int j = 0; j < 11; j++) r3[j] = 5'(xc % u64_t'(B3[j]));
      // Pipelined converter: idle every 97th cycle to show valid gating.
      in_v1p = (i % 97 != 50);
      for (int j = 0; j < 5; j++)  r1p[j] = 5'(xd % u64_t'(B1[j]));
      if (in_v1p) begin
        pipe_exp.push_back(xd);
        pipe_issue.push_back(cycle);
      end
      #1;
      check("B1 x", u64_t'(x1), xa);
      check("B2 x", u64_t'(x2), xb);
      check("B3 x", u64_t'(x3), xc);
      checks++;
      if (!(v1 && v2 && v3)) begin failures++; $display("FAIL valid"); end
      rho_count[0][rho1]++;
      rho_count[1][rho2]++;
      rho_count[2][rho3]++;
    end
    @(negedge clk) in_v1p = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (pipe_exp.size() != 0) begin failures++; $display("FAIL pipelined results missing"); end

    // Mechanism coverage.
    for (int k = 0; k < 4; k++) begin
      $display("converter %0d: rho=0 %0d times, rho=1 %0d times", k, rho_count[k][0], rho_count[k][1]);
      checks += 2;
      if (rho_count[k][0] == 0) begin failures++; $display("FAIL converter %0d never had rho=0", k); end
      if (rho_count[k][1] == 0) begin failures++; $display("FAIL converter %0d never had rho=1", k); end
    end
    checks += 3;
    if (u_b1.CASE1 != 1'b1 || u_b2.CASE1 != 1'b1) begin failures++; $display("FAIL B1/B2 not case 1"); end
    if (u_b3.CASE1 != 1'b0) begin failures++; $display("FAIL B3 not case 2"); end
    if (u_b1.P != 24 || u_b2.P != 33 || u_b3.P != 47) begin failures++; $display("FAIL M_B exponents"); end
    $display("pipelined results with 3-cycle latency: %0d", pipe_results);
    checks++;
    if (pipe_results < NCYC - NCYC / 97 - 2) begin failures++; $display("FAIL too few pipelined results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
