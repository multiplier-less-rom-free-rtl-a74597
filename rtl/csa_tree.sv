// csa_tree: multi-operand adder built from full-adder (3:2) cells.
//
// Adds N operands of W bits modulo 2^W in one combinational pass. Each
// level groups the operands in threes and replaces every group by a sum word
// (a ^ b ^ c) and a carry word (majority(a, b, c) shifted left one place):
// one row of full-adder cells per group. Left-over operands pass to the next
// level unchanged. When two operands remain a single carry-propagate adder
// produces the result. This is the parallel, fully unrolled addition the
// optimized adder tree relies on; the grouping order is this design's own.
module csa_tree #(
  parameter int N = 10,
  parameter int W = 22
) (
  input  logic [W-1:0] op [N],
  output logic [W-1:0] sum
);
  // number of operands left after lvl levels of 3:2 reduction
  function automatic int cnt_at(input int lvl);
    int c = N;
    for (int l = 0; l < lvl; l++) c = (c / 3) * 2 + (c % 3);
    return c;
  endfunction

  function automatic int num_levels();
    int c = N;
    int l = 0;
    while (c > 2) begin
      c = (c / 3) * 2 + (c % 3);
      l++;
    end
    return l;
  endfunction

  localparam int L = num_levels();

  always_comb begin
    logic [W-1:0] v  [N];
    logic [W-1:0] nv [N];
    logic [W-1:0] a, b, c;
    int cnt, g, r;
    v = op;
    for (int l = 0; l < L; l++) begin
      cnt = cnt_at(l);
      g   = cnt / 3;
      r   = cnt % 3;
      for (int k = 0; k < N; k++) nv[k] = '0;
      for (int k = 0; k < N; k++) begin
        if (k < g) begin
          // one row of full-adder cells
          a = v[3*k];
          b = v[3*k+1];
          c = v[3*k+2];
          nv[2*k]   = a ^ b ^ c;
          nv[2*k+1] = ((a & b) | (a & c) | (b & c)) << 1;
        end else if (k < g + r) begin
          nv[2*g + (k-g)] = v[3*g + (k-g)];
        end
      end
      v = nv;
    end
    sum = (N >= 2) ? v[0] + v[1] : v[0];
  end
endmodule
