// transpose_buffer: ping-pong 8x8 transpose memory between the two 1-D DCTs.
//
// Two banks of N x N words of W bits (12 bits in the design). Rows are
// written one per in_valid, filling one bank; when its N-th row is written
// the bank is marked full and writing moves to the other bank. A full bank
// is read one column per clock, combinationally from the registers
// (out_col[r] = row r of column out_idx), and freed after its last column.
// Since a bank takes N clocks to read and at least N clocks to fill, the
// writer never finds its bank still full at the stream rate of one row per
// clock; an assertion checks this. Timing: the row written at edge k may be
// read in the clock after edge k, so the first column of a block is out one
// clock after its last row arrives. The double buffering and the column
// readout are this design's choice; the design gives only the buffer's
// purpose and word length.
module transpose_buffer #(
  parameter int N = 8,
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_row  [N],
  output logic                out_valid,
  output logic                out_first,   // first column of a block
  output logic [$clog2(N)-1:0] out_idx,    // column index
  output logic signed [W-1:0] out_col [N],
  output logic                swap         // a bank was filled this clock
);
  localparam int AW = $clog2(N);

  logic signed [W-1:0] mem [2][N][N];   // [bank][row][col]
  logic [1:0]          full;
  logic                wr_bank, rd_bank;
  logic [AW-1:0]       wr_row, rd_col;

  always_ff @(posedge clk)
    if (in_valid) mem[wr_bank][wr_row] <= in_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
      wr_row  <= '0;
      rd_col  <= '0;
    end else begin
      if (in_valid) begin
        if (wr_row == AW'(N-1)) begin
          wr_row        <= '0;
          full[wr_bank] <= 1'b1;
          wr_bank       <= ~wr_bank;
        end else begin
          wr_row <= wr_row + 1'b1;
        end
      end
      if (full[rd_bank]) begin
        if (rd_col == AW'(N-1)) begin
          rd_col        <= '0;
          full[rd_bank] <= 1'b0;
          rd_bank       <= ~rd_bank;
        end else begin
          rd_col <= rd_col + 1'b1;
        end
      end
    end
  end

  assign swap      = in_valid && (wr_row == AW'(N-1));
  assign out_valid = full[rd_bank];
  assign out_first = full[rd_bank] && (rd_col == '0);
  assign out_idx   = rd_col;

  always_comb
    for (int r = 0; r < N; r++) out_col[r] = mem[rd_bank][r][rd_col];

  // The writer must never reach a bank that is still being read.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> !full[wr_bank]);
endmodule
