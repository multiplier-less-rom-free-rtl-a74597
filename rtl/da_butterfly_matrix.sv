// da_butterfly_matrix: the DA-butterfly-matrix of the 1-D 8-point DCT.
//
// Combines the 12-adder butterfly with two DA even processing elements and
// one DA odd processing element. Output y[n][j] is DA word j of transform
// output Z_n (n = 0..7), so that
//   Z_n * 2^(Q-1) = -y[n][0] * 2^(Q-1) + sum_(j>=1) y[n][j] * 2^(Q-1-j)
// which the optimized adder trees evaluate. All words are WW = IN_W + 3 bits
// wide (12 bits for the 9-bit input of the first stage). Combinational; the
// 1-D core registers its outputs.
module da_butterfly_matrix
  import dct_pkg::*;
#(
  parameter int IN_W = 9,
  parameter int WW   = IN_W + 3
) (
  input  logic signed [IN_W-1:0] x [8],
  output logic signed [WW-1:0]   y [8][Q]
);
  logic signed [IN_W:0]   b  [4];
  logic signed [IN_W+1:0] ea [2];
  logic signed [IN_W+1:0] eb [2];
  logic signed [WW-1:0]   y04 [2][Q];
  logic signed [WW-1:0]   y26 [2][Q];
  logic signed [WW-1:0]   yo  [4][Q];

  dct_butterfly #(.IN_W(IN_W)) u_bfly (.x(x), .b(b), .ea(ea), .eb(eb));

  dae #(.PAIR(0), .IW(IN_W+2), .WW(WW)) u_dae0 (.in(ea), .y(y04));
  dae #(.PAIR(1), .IW(IN_W+2), .WW(WW)) u_dae1 (.in(eb), .y(y26));
  dao #(.IW(IN_W+1), .WW(WW))           u_dao  (.b(b),   .y(yo));

  always_comb begin
    y[0] = y04[0];
    y[4] = y04[1];
    y[2] = y26[0];
    y[6] = y26[1];
    for (int r = 0; r < 4; r++) y[2*r+1] = yo[r];
  end
endmodule
