// dct2d: 8x8 2-D DCT core built from two DA-based 1-D DCT cores.
//
// Row-column decomposition. Each clock one row of eight 9-bit signed pixels
// enters. The first 1-D core (9-bit input) transforms it; its eight results,
// rounded to 12 bits, are written straight into the ping-pong transpose
// buffer (its optimized adder trees are not registered separately: the
// buffer is their register). Once a block's eight rows are in, the buffer
// delivers one column per clock to the second 1-D core (12-bit input),
// whose results are scaled by 1/4 and saturated to 12 bits. Overall
//   Y[u][v] = 1/4 c(u) c(v) sum_r sum_c x[r][c] cos((2r+1)u pi/16) cos((2c+1)v pi/16)
// with c(0) = 1/sqrt(2) and c(k) = 1, the orthonormal 2-D DCT.
// Output: each out_valid beat carries column v = out_idx of the coefficient
// block, out_col[u] = Y[u][v]; out_first marks v = 0. Throughput is eight
// pixels per clock. With a block's rows presented back to back, its first
// column is registered 10 clock edges after the edge that takes its first
// row (presented 11 clocks after the first row was presented); the last
// column follows 7 clocks later. in_valid may be dropped between rows at
// any time.
// Word lengths (9-bit in, 12-bit buffer, 12-bit out, DA precision 9) follow
// the design; the scaling split and the output orientation are chosen here.
module dct2d
  import dct_pkg::*;
#(
  parameter int IN_W     = 9,
  parameter int TB_W     = 12,
  parameter int OUT_W    = 12,
  parameter int TP_MAJOR = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_row  [8],
  output logic                    out_valid,
  output logic                    out_first,
  output logic [2:0]              out_idx,
  output logic signed [OUT_W-1:0] out_col [8],
  output logic                    bank_swap    // transpose buffer changed banks
);
  logic                   r_valid;
  logic signed [TB_W-1:0] r_z [8];
  logic                   t_valid, t_first;
  logic [2:0]             t_idx;
  logic signed [TB_W-1:0] t_col [8];
  logic                   first_q1, first_q2;
  logic [2:0]             idx_q1, idx_q2;

  dct1d #(.IN_W(IN_W), .OUT_W(TB_W), .OUT_SHIFT(0), .TP_MAJOR(TP_MAJOR),
          .SAT(1'b1), .OUT_REG(1'b0)) u_row (
    .clk, .rst_n, .in_valid(in_valid), .x(in_row),
    .out_valid(r_valid), .z(r_z));

  transpose_buffer #(.N(8), .W(TB_W)) u_tbuf (
    .clk, .rst_n, .in_valid(r_valid), .in_row(r_z),
    .out_valid(t_valid), .out_first(t_first), .out_idx(t_idx),
    .out_col(t_col), .swap(bank_swap));

  dct1d #(.IN_W(TB_W), .OUT_W(OUT_W), .OUT_SHIFT(2), .TP_MAJOR(TP_MAJOR),
          .SAT(1'b1), .OUT_REG(1'b1)) u_col (
    .clk, .rst_n, .in_valid(t_valid), .x(t_col),
    .out_valid(out_valid), .z(out_col));

  // column tags travel alongside the two pipeline stages of the second core
  always_ff @(posedge clk) begin
    first_q1 <= t_first;
    idx_q1   <= t_idx;
    first_q2 <= first_q1;
    idx_q2   <= idx_q1;
  end

  assign out_first = out_valid && first_q2;
  assign out_idx   = idx_q2;
endmodule
