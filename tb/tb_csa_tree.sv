// tb_csa_tree: self-checking test of the n-operand carry-save tree.
// Instances with 5 operands (27 bits), 7 (35 bits), 11 (51 bits) and 42
// operands (20 bits). For random operands, s + c must equal the sum of the
// operands modulo 2^W. The number of layers of trees with 3, 4, 6, 9, 13,
// 19, 28 and 42 operands (the largest counts per depth) must be 1 .. 8, and
// one more operand must need one more layer.
module tb_csa_tree;
  int checks = 0;
  int failures = 0;

  logic [4:0][26:0]  o5;
  logic [26:0]       s5, c5;
  logic [6:0][34:0]  o7;
  logic [34:0]       s7, c7;
  logic [10:0][50:0] o11;
  logic [50:0]       s11, c11;
  logic [41:0][19:0] o42;
  logic [19:0]       s42, c42;

  csa_tree #(.N(5),  .W(27)) u5  (.ops(o5),  .s(s5),  .c(c5));
  csa_tree #(.N(7),  .W(35)) u7  (.ops(o7),  .s(s7),  .c(c7));
  csa_tree #(.N(11), .W(51)) u11 (.ops(o11), .s(s11), .c(c11));
  csa_tree #(.N(42), .W(20)) u42 (.ops(o42), .s(s42), .c(c42));

  // Depth checks, one tree per operand count.
  localparam int NMAX [8] = '{3, 4, 6, 9, 13, 19, 28, 42};
  for (genvar d = 0; d < 8; d++) begin : g_depth
    logic [NMAX[d]-1:0][3:0] oa;
    logic [NMAX[d]:0][3:0]   ob;
    logic [3:0] sa, ca, sb, cb;
    assign oa = '0;
    assign ob = '0;
    csa_tree #(.N(NMAX[d]),     .W(4)) ua (.ops(oa), .s(sa), .c(ca));
    csa_tree #(.N(NMAX[d] + 1), .W(4)) ub (.ops(ob), .s(sb), .c(cb));
  end

  int layers_a [8];
  int layers_b [8];
  for (genvar d = 0; d < 8; d++) begin : g_collect
    assign layers_a[d] = g_depth[d].ua.LAYERS;
    assign layers_b[d] = g_depth[d].ub.LAYERS;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e5, e7, e11, e42;
    #1;
    for (int d = 0; d < 8; d++) begin
      checks += 2;
      if (layers_a[d] != d + 1 || layers_b[d] != d + 2) begin
        failures++;
        $display("FAIL depth n=%0d: %0d layers, n+1: %0d layers", NMAX[d], layers_a[d], layers_b[d]);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      e5 = 0; e7 = 0; e11 = 0; e42 = 0;
      for (int k = 0; k < 5; k++) begin
        o5[k] = (i == 0) ? '1 : 27'($urandom);
        e5 += 64'(o5[k]);
      end
      for (int k = 0; k < 7; k++) begin
        o7[k] = (i == 0) ? '1 : 35'({$urandom, $urandom});
        e7 += 64'(o7[k]);
      end
      for (int k = 0; k < 11; k++) begin
        o11[k] = (i == 0) ? '1 : 51'({$urandom, $urandom});
        e11 += 64'(o11[k]);
      end
      for (int k = 0; k < 42; k++) begin
        o42[k] = (i == 0) ? '1 : 20'($urandom);
        e42 += 64'(o42[k]);
      end
      #1;
      checks += 4;
      if (s5 + c5 != 27'(e5)) begin failures++; $display("FAIL n=5 i=%0d", i); end
      if (s7 + c7 != 35'(e7)) begin failures++; $display("FAIL n=7 i=%0d", i); end
      if (s11 + c11 != 51'(e11)) begin failures++; $display("FAIL n=11 i=%0d", i); end
      if (s42 + c42 != 20'(e42)) begin failures++; $display("FAIL n=42 i=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
