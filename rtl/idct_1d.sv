// idct_1d: one output sample of an 8-point inverse DCT.
//
// sum = sum over u of vec[u] * K[u][pos], with
// K[u][x] = round(4096 * C(u) * cos((2x+1) u pi / 16)), C(0) = 1/sqrt(2),
// C(u) = 1 otherwise (jpeg_pkg::idct_coef). The result is 8192 times the
// JPEG 1-D IDCT value (1/2 * sum C(u) F(u) cos(...)); the caller scales it.
// Purely combinational: eight constant-table multipliers and an adder tree.
// The IDCT block uses one instance for its row pass (IDCT-X) and one for its
// column pass (IDCT-Y).
module idct_1d
  import jpeg_pkg::*;
#(
  parameter int IN_W = 16
) (
  input  logic signed [IN_W-1:0]  vec [8],
  input  logic        [2:0]       pos,
  output logic signed [IN_W+16:0] sum
);
  logic signed [13:0] kmat [8][8];

  for (genvar u = 0; u < 8; u++) begin : g_u
    for (genvar x = 0; x < 8; x++) begin : g_x
      localparam int KC = idct_coef(u, x);
      assign kmat[u][x] = 14'(KC);
    end
  end

  always_comb begin
    sum = '0;
    for (int u = 0; u < 8; u++)
      sum += (IN_W+17)'(vec[u]) * (IN_W+17)'(kmat[u][pos]);
  end
endmodule
