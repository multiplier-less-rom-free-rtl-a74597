// dao: DA odd processing element.
//
// Turns the four odd-part butterfly outputs b0..b3 into the Q distributed
// arithmetic words of each odd output Z1, Z3, Z5, Z7 (row r gives Z(2r+1)):
//   y[r][j] = sum over c of  bit(Q-1-j) of odd_coef(r, c)  *  b[c]
// j = 0 carries the sign weight -2^0, j = 1..Q-1 the weights 2^-j. For Z1
// this gives y_1 = b0+b1+b2, y_2 = b0+b1, y_3 = b0+b3, ... as in the
// bit-level formulation of the design. Purely combinational; the adders of
// each word are left for synthesis to share.
module dao
  import dct_pkg::*;
#(
  parameter int IW = 10,          // width of b inputs
  parameter int WW = IW + 2       // width of a DA word (sum of up to 4 inputs)
) (
  input  logic signed [IW-1:0] b [4],
  output logic signed [WW-1:0] y [4][Q]
);
  always_comb begin
    coef_t k;
    for (int r = 0; r < 4; r++) begin
      for (int j = 0; j < Q; j++) begin
        y[r][j] = '0;
        for (int c = 0; c < 4; c++) begin
          k = odd_coef(r, c);
          if (k[Q-1-j])
            y[r][j] = y[r][j] + WW'(b[c]);
        end
      end
    end
  end
endmodule
