// dae: DA even processing element.
//
// Turns the two even-part inputs of one output pair into the Q distributed
// arithmetic words of both outputs. For output r of the pair and bit weight
// j (j = 0 is the -2^0 sign weight, j = 1..Q-1 the weights 2^-j) the word is
//   y[r][j] = sum over c of  bit(Q-1-j) of even_coef(PAIR, r, c)  *  in[c]
// so each word is the sum of a subset of the inputs chosen by the constant
// coefficient bits: no multiplier and no ROM. PAIR = 0 takes A0, A1 and
// yields Z0 and Z4 (coefficients C4, C4 / C4, -C4); PAIR = 1 takes B0, B1
// and yields Z2 and Z6 (C2, C6 / C6, -C2). For PAIR = 0 the Z0 words are 0
// or A0 + A1, a single adder, as in the design. Purely combinational.
module dae
  import dct_pkg::*;
#(
  parameter int PAIR = 0,
  parameter int IW   = 11,        // width of A/B inputs
  parameter int WW   = IW + 1     // width of a DA word
) (
  input  logic signed [IW-1:0] in [2],
  output logic signed [WW-1:0] y  [2][Q]
);
  always_comb begin
    coef_t k;
    for (int r = 0; r < 2; r++) begin
      for (int j = 0; j < Q; j++) begin
        y[r][j] = '0;
        for (int c = 0; c < 2; c++) begin
          k = even_coef(PAIR, r, c);
          if (k[Q-1-j])
            y[r][j] = y[r][j] + WW'(in[c]);
        end
      end
    end
  end
endmodule
