// oat: optimized adder tree with error compensation.
//
// Evaluates one DCT output from its Q distributed-arithmetic words in a
// single combinational pass:
//   Z * 2^F = -y[0] * 2^F + sum_(j=1..Q-1) y[j] * 2^(F-j),   F = Q-1
// All Q shifted words are added at once (unrolled) in a full-adder tree
// instead of Q cycles of serial shift-and-add. The result keeps the bits at
// and above column T = F + OUT_SHIFT (the main part, MP); the T columns
// below form the truncation part (TP). To avoid both a full-width adder and
// the large error of dropping the TP, the TP is split:
//   * the TP_MAJOR columns next to the MP are added exactly, so their carry
//     into the MP is produced by the tree;
//   * the lower columns are not built at all; their expected contribution
//     (each dropped bit taken as 1 with probability 1/2) is added back as a
//     constant, together with 2^(T-1) so that the output is rounded to the
//     nearest integer rather than floored.
// The negated sign word -y[0] is formed as ~y[0] with the +1 folded into the
// same constant. The design calls this an error-compensated adder tree but
// gives no gate-level detail; the split and the statistical constant are
// this implementation's choice. The T low bits of the tree's sum are the
// truncation part and are deliberately left unused. With SAT = 1 the output saturates to OUT_W
// bits, otherwise it wraps (the first-stage range never needs more).
module oat #(
  parameter int WW        = 12,  // DA word width
  parameter int Q         = 9,   // DA precision (number of words)
  parameter int OUT_W     = 12,
  parameter int OUT_SHIFT = 0,   // extra right shift of the result
  parameter int TP_MAJOR  = 3,   // truncation-part columns kept exactly
  parameter bit SAT       = 1'b0
) (
  input  logic signed [WW-1:0]    y [Q],
  output logic signed [OUT_W-1:0] z
);
  localparam int F   = Q - 1;
  localparam int T   = F + OUT_SHIFT;                       // TP columns
  localparam int CUT = (T > TP_MAJOR) ? T - TP_MAJOR : 0;   // columns not built
  localparam int SW  = WW + Q + 1;                          // tree width
  localparam int RW  = SW - T;                              // width of MP

  // Compensation constant: rounding half, the +1 of the negated sign word,
  // and half of the weight of every word bit that falls below column CUT.
  function automatic longint comp_const();
    longint acc = 0;
    for (int j = 0; j < Q; j++)
      for (int b = 0; b < WW; b++)
        if (F - j + b < CUT) acc += longint'(1) << (F - j + b);
    acc = acc / 2;
    acc += longint'(1) << F;
    if (T > 0) acc += longint'(1) << (T - 1);
    return acc;
  endfunction

  localparam logic [SW-1:0] COMP = SW'(comp_const());
  localparam logic [SW-1:0] MASK = ~((SW'(1) << CUT) - SW'(1));

  logic [SW-1:0] op [Q+1];
  logic [SW-1:0] total;

  always_comb begin
    logic signed [SW-1:0] w;
    w = SW'(y[0]);
    op[0] = ((~w) << F) & MASK;
    for (int j = 1; j < Q; j++) begin
      w = SW'(y[j]);
      op[j] = (w << (F - j)) & MASK;
    end
    op[Q] = COMP;
  end

  csa_tree #(.N(Q+1), .W(SW)) u_tree (.op(op), .sum(total));

  logic signed [RW-1:0] mp;
  assign mp = total[SW-1:T];

  localparam logic signed [RW-1:0] ZMAX = RW'((longint'(1) << (OUT_W-1)) - 1);
  localparam logic signed [RW-1:0] ZMIN = RW'(-(longint'(1) << (OUT_W-1)));

  always_comb begin
    if (SAT && mp > ZMAX)      z = ZMAX[OUT_W-1:0];
    else if (SAT && mp < ZMIN) z = ZMIN[OUT_W-1:0];
    else                       z = mp[OUT_W-1:0];
  end
endmodule
