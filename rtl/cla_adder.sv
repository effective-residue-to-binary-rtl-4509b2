// cla_adder: two-operand carry-look-ahead (parallel-prefix) adder.
//
// Computes {cout, sum} = a + b + cin. Generate g_i = a_i & b_i and propagate
// p_i = a_i ^ b_i signals are combined by a Kogge-Stone prefix network of
// ceil(log2(W+1)) levels, so every carry is available after a logarithmic
// number of gate levels; the carry into bit i is the group generate of bits
// i-1..0 with cin treated as a generate below bit 0. The converter uses it
// three times: for the sum of projections and for the two parallel
// correction adders. The prefix topology is this design's choice; the
// converter only requires a fast carry-look-ahead adder whose area grows as
// W*log W.
// Timing: purely combinational.
module cla_adder #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = $clog2(W + 1);

  // Prefix signals per level; index 0 of each vector stands for cin.
  logic [W:0] g [LEVELS+1];
  logic [W:0] p [LEVELS+1];
  logic [W-1:0] hp;  // half-sum a ^ b

  assign hp   = a ^ b;
  assign g[0] = {a & b, cin};
  assign p[0] = {hp, 1'b0};

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i <= W; i++) begin : g_bit
      if (i >= D) begin : g_combine
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-D]);
        assign p[l+1][i] = p[l][i] & p[l][i-D];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // g[LEVELS][i] is the carry out of bit position i-1 (into bit i).
  assign sum  = hp ^ g[LEVELS][W-1:0];
  assign cout = g[LEVELS][W];

endmodule
