// tb_crt_proj_rom: self-checking test of the projection ROM.
//
// Two ROMs of the base {32,31,29,27,19} (moduli 32 and 19) and one of the
// 11-modulus base (modulus 23) are read at every address. The expected
// projection is found independently of the ROM's inverse computation: it
// is the unique multiple k*M_j, 0 <= k < m_j, whose residue modulo m_j
// equals the address. Addresses at or above the modulus must read zero.
module tb_crt_proj_rom;
  import crt_pkg::*;

  localparam u64_t M1 = 64'd14757984;
  localparam u64_t M3 = 64'd144403552893600;

  int checks = 0;
  int failures = 0;

  logic [4:0]  a32, a19, a23;
  logic [26:0] p32, p19;
  logic [50:0] p23;

  crt_proj_rom #(.MODULUS(32), .PROD(M1), .AW(5), .W(27)) u32 (.residue(a32), .proj(p32));
  crt_proj_rom #(.MODULUS(19), .PROD(M1), .AW(5), .W(27)) u19 (.residue(a19), .proj(p19));
  crt_proj_rom #(.MODULUS(23), .PROD(M3), .AW(5), .W(51)) u23 (.residue(a23), .proj(p23));

  function automatic u64_t expect_proj(u64_t prod, u64_t m, u64_t x);
    u64_t mj = prod / m;
    if (x >= m) return 0;
    for (u64_t k = 0; k < m; k++) if ((mj * k) % m == x) return mj * k;
    return 64'hdead;
  endfunction

  task automatic check(string name, u64_t got, u64_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", name, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      a32 = 5'(a); a19 = 5'(a); a23 = 5'(a);
      #1;
      check($sformatf("m=32 x=%0d", a), u64_t'(p32), expect_proj(M1, 32, u64_t'(a)));
      check($sformatf("m=19 x=%0d", a), u64_t'(p19), expect_proj(M1, 19, u64_t'(a)));
      check($sformatf("m=23 x=%0d", a), u64_t'(p23), expect_proj(M3, 23, u64_t'(a)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
