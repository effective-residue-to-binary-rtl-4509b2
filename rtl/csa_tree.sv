// csa_tree: n-operand carry-save adder tree (Wallace-style reduction).
//
// Reduces N W-bit operands to two vectors, s and c, with s + c equal to the
// sum of the operands modulo 2^W (the carry vector is already shifted to its
// weight). Each layer groups the operands in threes and replaces every group
// by a csa_3to2 row, passing the one or two operands left over to the next
// layer, so a layer turns k operands into 2*floor(k/3) + (k mod 3). The
// number of layers is therefore 1, 2, 3, 4, 5, 6, 7, 8 for at most
// 3, 4, 6, 9, 13, 19, 28, 42 operands. Carries out of bit W-1 are dropped;
// the caller sizes W so that the true sum fits. The layer counts are those
// the converter's delay estimate assumes; the grouping in threes from the
// first operand on is this design's choice.
// Timing: purely combinational, LAYERS full-adder delays.
module csa_tree #(
  parameter int unsigned N = 5,   // number of operands (n), at least 2
  parameter int unsigned W = 27   // operand and result width
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        s,
  output logic [W-1:0]        c
);

  // Operands left after l layers.
  function automatic int unsigned count_at(int unsigned l);
    int unsigned k = N;
    for (int unsigned i = 0; i < l; i++) if (k > 2) k = 2 * (k / 3) + k % 3;
    return k;
  endfunction

  function automatic int unsigned num_layers();
    int unsigned k = N;
    int unsigned l = 0;
    while (k > 2) begin
      k = 2 * (k / 3) + k % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LAYERS = num_layers();

  // Each layer block holds the operands it produces (nxt); layer 0 reads
  // the inputs. Unused slots are tied to zero.
  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    localparam int unsigned K      = count_at(l);
    localparam int unsigned GROUPS = K / 3;
    localparam int unsigned REST   = K % 3;
    localparam int unsigned KNEXT  = 2 * GROUPS + REST;
    logic [W-1:0] cur [N];
    logic [W-1:0] nxt [N];
    if (l == 0) begin : g_first
      for (genvar i = 0; i < N; i++) begin : g_in
        assign cur[i] = ops[i];
      end
    end else begin : g_chain
      assign cur = g_layer[l-1].nxt;
    end
    for (genvar g = 0; g < GROUPS; g++) begin : g_row
      logic [W-1:0] cy;
      csa_3to2 #(.W(W)) u_row (
        .a    (cur[3*g]),
        .b    (cur[3*g+1]),
        .c    (cur[3*g+2]),
        .sum  (nxt[2*g]),
        .carry(cy)
      );
      assign nxt[2*g+1] = {cy[W-2:0], 1'b0};
    end
    for (genvar r = 0; r < REST; r++) begin : g_pass
      assign nxt[2*GROUPS+r] = cur[3*GROUPS+r];
    end
    for (genvar u = KNEXT; u < N; u++) begin : g_idle
      assign nxt[u] = '0;
    end
  end

  if (LAYERS == 0) begin : g_two
    assign s = ops[0];
    assign c = ops[1];
  end else begin : g_out
    assign s = g_layer[LAYERS-1].nxt[0];
    assign c = g_layer[LAYERS-1].nxt[1];
  end

  initial begin
    assert (N >= 2) else $error("csa_tree: N must be at least 2");
  end

endmodule
