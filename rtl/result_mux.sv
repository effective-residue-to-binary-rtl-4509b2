// result_mux: final 2-to-1 multiplexer of the converter.
//
// The two parallel adders produce the candidates X_B +/- delta*r_B (rho = 0)
// and the same value corrected by M (rho = 1); exactly one of them lies in
// [0, M). The select input is the carry (non-negative) flag of the
// candidate that may be negative: sel = 1 passes in1, sel = 0 passes in0.
// Only the low W bits are passed; the result is X. The converter drives
// sel from the carry of the M-subtracting adder when M < M_B, as its block
// diagram shows; deriving it from the other adder when M > M_B is this
// design's choice (see crt_r2b_converter).
// Timing: purely combinational.
module result_mux #(
  parameter int unsigned W = 24
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] y
);

  always_comb y = sel ? in1 : in0;

endmodule
