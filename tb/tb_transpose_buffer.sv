// tb_transpose_buffer: checks the ping-pong transpose buffer.
// Blocks of 8 rows of random 12-bit words are written, partly back to back
// and partly with idle clocks between rows. Every column read must equal
// the column of the block written, blocks must come out in order with
// out_idx counting 0..7 and out_first on column 0, the first column must
// appear in the clock right after the block's last row was written, and
// both banks must have been used.
module tb_transpose_buffer;
  localparam int N = 8;
  localparam int W = 12;
  localparam int NB = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] in_row [N];
  logic out_valid, out_first, swap;
  logic [2:0] out_idx;
  logic signed [W-1:0] out_col [N];
  int checks = 0, failures = 0;
  int cyc = 0;

  transpose_buffer #(.N(N), .W(W)) dut (.clk, .rst_n, .in_valid, .in_row,
    .out_valid, .out_first, .out_idx, .out_col, .swap);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    int d [N][N];
    int t_last;   // clock in which the last row was driven
  } blk_t;
  blk_t q [$];
  blk_t cur;
  int col = 0, blocks_out = 0, swaps = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && swap) swaps++;
    if (rst_n && out_valid) begin
      if (col == 0) begin
        check("output with no block written", q.size() != 0);
        if (q.size() != 0) cur = q.pop_front();
        check($sformatf("first column delay %0d", cyc - cur.t_last), cyc - cur.t_last == 1);
      end
      check("out_idx", out_idx == 3'(col));
      check("out_first", out_first == (col == 0));
      for (int r = 0; r < N; r++)
        check($sformatf("block %0d row %0d col %0d", blocks_out, r, col),
              int'(out_col[r]) == cur.d[r][col]);
      if (col == N - 1) begin
        col = 0;
        blocks_out++;
      end else col++;
    end
  end

  initial begin
    blk_t b;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < NB; k++) begin
      for (int r = 0; r < N; r++) begin
        @(posedge clk);
        if (k % 4 == 3 && $urandom_range(0, 2) == 0) begin
          in_valid <= 1'b0;
          repeat ($urandom_range(1, 3)) @(posedge clk);
        end
        for (int c = 0; c < N; c++) begin
          b.d[r][c] = int'($urandom_range(0, 4095)) - 2048;
          in_row[c] <= W'(b.d[r][c]);
        end
        in_valid <= 1'b1;
        b.t_last = cyc + 1;  // cyc is updated by a nonblocking assignment at this edge
      end
      q.push_back(b);
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    check($sformatf("blocks out %0d", blocks_out), blocks_out == NB);
    check($sformatf("bank swaps %0d", swaps), swaps == NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
