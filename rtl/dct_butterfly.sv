// dct_butterfly: input adder stage of the 1-D 8-point DCT.
//
// Twelve adders/subtractors, all combinational:
//   a_i = x_i + x_(7-i), b_i = x_i - x_(7-i)      (i = 0..3, eight units)
//   A0 = a0 + a3, A1 = a1 + a2, B0 = a0 - a3, B1 = a1 - a2  (four units)
// A0/A1 feed the DA even element for Z0/Z4, B0/B1 the one for Z2/Z6 and
// b0..b3 the DA odd element. Each level widens the words by one bit so no
// sum can overflow. This split follows the design; the widths are chosen
// here.
module dct_butterfly #(
  parameter int IN_W = 9
) (
  input  logic signed [IN_W-1:0] x [8],
  output logic signed [IN_W:0]   b [4],   // odd-part inputs
  output logic signed [IN_W+1:0] ea [2],  // A0, A1
  output logic signed [IN_W+1:0] eb [2]   // B0, B1
);
  logic signed [IN_W:0] a [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a[i] = (IN_W+1)'(x[i]) + (IN_W+1)'(x[7-i]);
      b[i] = (IN_W+1)'(x[i]) - (IN_W+1)'(x[7-i]);
    end
    ea[0] = (IN_W+2)'(a[0]) + (IN_W+2)'(a[3]);
    ea[1] = (IN_W+2)'(a[1]) + (IN_W+2)'(a[2]);
    eb[0] = (IN_W+2)'(a[0]) - (IN_W+2)'(a[3]);
    eb[1] = (IN_W+2)'(a[1]) - (IN_W+2)'(a[2]);
  end
endmodule
