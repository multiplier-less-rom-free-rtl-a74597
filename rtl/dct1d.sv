// dct1d: 1-D 8-point DCT core, eight inputs and eight outputs per clock.
//
// Computes Z_n = k_n * sum_m x_m * cos((2m+1) n pi / 16), n = 0..7, with
// k_0 = 1/sqrt(2) (through C4) and k_n = 1 otherwise, i.e. the DCT without its
// factor 1/2, scaled further by 2^-OUT_SHIFT.
//   Stage 1: DA-butterfly-matrix (12 adders/subtractors, two DA even and one
//            DA odd processing element) forms the Q DA words of every output;
//            they are registered.
//   Stage 2: eight optimized adder trees, one per output, finish all eight
//            results in the next cycle. With OUT_REG = 1 they are
//            registered; with OUT_REG = 0 they leave combinationally, for a
//            following register such as the transpose buffer.
// Timing: a vector presented with in_valid at clock edge k appears at
// out_valid/z after edge k+2 (OUT_REG = 1) or after edge k+1 (OUT_REG = 0).
// One new vector can be taken every clock. The pipeline cut is this
// design's choice; the structure follows the proposed 1-D core.
module dct1d
  import dct_pkg::*;
#(
  parameter int IN_W      = 9,
  parameter int OUT_W     = 12,
  parameter int OUT_SHIFT = 0,
  parameter int TP_MAJOR  = 3,
  parameter bit SAT       = 1'b0,
  parameter bit OUT_REG   = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] z [8]
);
  localparam int WW = IN_W + 3;

  logic signed [WW-1:0]    y_c [8][Q];
  logic signed [WW-1:0]    y_q [8][Q];
  logic                    v_q;
  logic signed [OUT_W-1:0] z_c [8];

  da_butterfly_matrix #(.IN_W(IN_W), .WW(WW)) u_dabm (.x(x), .y(y_c));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;

  always_ff @(posedge clk)
    if (in_valid) y_q <= y_c;

  for (genvar n = 0; n < 8; n++) begin : g_oat
    oat #(.WW(WW), .Q(Q), .OUT_W(OUT_W), .OUT_SHIFT(OUT_SHIFT),
          .TP_MAJOR(TP_MAJOR), .SAT(SAT)) u_oat (.y(y_q[n]), .z(z_c[n]));
  end

  if (OUT_REG) begin : g_oreg
    logic                    v_o;
    logic signed [OUT_W-1:0] z_o [8];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) v_o <= 1'b0;
      else        v_o <= v_q;
    always_ff @(posedge clk)
      if (v_q) z_o <= z_c;
    assign out_valid = v_o;
    assign z         = z_o;
  end else begin : g_ocomb
    assign out_valid = v_q;
    assign z         = z_c;
  end
endmodule
