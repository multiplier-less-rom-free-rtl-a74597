// tb_dct2d: end-to-end test of the 8x8 2-D DCT core at its default sizes.
// A 256x256 8-bit test image (smooth gradients, sinusoids and noise, made
// here; level-shifted by -128 to 9-bit signed) is streamed through the core
// block by block, eight pixels per clock, followed by blocks at the ends of
// the input range. For every block:
//   * each coefficient must be within 3 of the double-precision orthonormal
//     2-D DCT computed here,
//   * columns must come out in order (out_idx 0..7, out_first on 0),
//   * with the block's rows sent back to back, its first column must be
//     presented 11 clocks after its first row was presented (10 clock edges
//     after the edge that takes the first row).
// The image is then rebuilt from the output coefficients with a
// double-precision inverse DCT and the PSNR against the original must be at
// least 40 dB. The test counts the mechanisms of the core and fails if one
// never happened: transpose-buffer bank swaps, idle input clocks inside a
// block, blocks streamed back to back, and the coefficient range reaching
// 12-bit limits (|Y| >= 2000).
module tb_dct2d;
  localparam int IMG = 256;
  localparam int NBX = IMG / 8;
  localparam int NEXTRA = 4;                       // extreme blocks after the image
  localparam int NBLK = NBX * NBX + NEXTRA;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [8:0]  in_row [8];
  logic out_valid, out_first, bank_swap;
  logic [2:0] out_idx;
  logic signed [11:0] out_col [8];

  dct2d dut (.clk, .rst_n, .in_valid, .in_row, .out_valid, .out_first,
             .out_idx, .out_col, .bank_swap);

  always #4 clk = ~clk;   // 125 MHz
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int img [IMG][IMG];
  int blk_in [NBLK][8][8];
  int blk_out [NBLK][8][8];
  int t_first [NBLK];
  bit back_to_back [NBLK];
  int n_swap = 0, n_bubble = 0, n_b2b = 0, n_big = 0, n_lat = 0;
  int ob = 0, oc = 0;
  real cosm [8][8];        // c(u)/2 * cos((2m+1) u pi / 16)
  real max_err = 0.0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // monitor: collect output columns
  always @(negedge clk) begin
    if (rst_n && bank_swap) n_swap++;
    if (rst_n && out_valid) begin
      if (ob >= NBLK) begin
        check("output beyond the last block", 1'b0);
      end else begin
        check($sformatf("out_idx %0d want %0d", out_idx, oc), out_idx == 3'(oc));
        check("out_first", out_first == (oc == 0));
        if (oc == 0 && back_to_back[ob]) begin
          n_lat++;
          check($sformatf("block %0d latency %0d", ob, cyc - t_first[ob]),
                cyc - t_first[ob] == 11);
        end
        for (int u = 0; u < 8; u++) begin
          blk_out[ob][u][oc] = int'(out_col[u]);
          if (out_col[u] >= 12'sd2000 || out_col[u] <= -12'sd2000) n_big++;
        end
        if (oc == 7) begin
          oc = 0;
          ob++;
        end else oc++;
      end
    end
  end

  function automatic real ref_coef(input int b, input int u, input int v);
    real s = 0.0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        s += cosm[u][r] * cosm[v][c] * real'(blk_in[b][r][c]);
    return s;
  endfunction

  initial begin
    real e, mse, psnr, rec;
    int by, bx;
    for (int u = 0; u < 8; u++)
      for (int m = 0; m < 8; m++)
        cosm[u][m] = ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0) * 0.5 *
                     $cos(real'((2*m+1)*u) * PI / 16.0);
    // test image
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        real p = 128.0 + 70.0 * $sin(real'(r) / 11.0) * $cos(real'(c) / 17.0)
                 + 0.2 * real'(c - r) + real'(int'($urandom_range(0, 40)) - 20);
        if (r >= 96 && r < 160 && c >= 96 && c < 160) p = ((r / 4 + c / 4) % 2 == 1) ? 250.0 : 5.0;
        img[r][c] = (p < 0.0) ? 0 : (p > 255.0) ? 255 : int'($floor(p));
      end
    for (int b = 0; b < NBX * NBX; b++) begin
      by = b / NBX;
      bx = b % NBX;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) blk_in[b][r][c] = img[by*8 + r][bx*8 + c] - 128;
    end
    // extreme blocks: all minimum, all maximum, checkerboard, stripes
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        blk_in[NBX*NBX + 0][r][c] = -256;
        blk_in[NBX*NBX + 1][r][c] = 255;
        blk_in[NBX*NBX + 2][r][c] = ((r + c) % 2 == 1) ? 255 : -256;
        blk_in[NBX*NBX + 3][r][c] = (c % 2 == 1) ? -256 : 255;
      end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      // idle clocks now and then between blocks
      if (b % 37 == 5) begin
        @(posedge clk);
        in_valid <= 1'b0;
      end
      back_to_back[b] = 1'b1;
      for (int r = 0; r < 8; r++) begin
        @(posedge clk);
        // an idle clock inside some blocks
        if (b % 53 == 7 && r == 3) begin
          in_valid <= 1'b0;
          back_to_back[b] = 1'b0;
          n_bubble++;
          @(posedge clk);
        end
        for (int c = 0; c < 8; c++) in_row[c] <= 9'(blk_in[b][r][c]);
        in_valid <= 1'b1;
        if (r == 0) t_first[b] = cyc + 1;   // cyc is updated by a nonblocking assignment at this edge
      end
      if (back_to_back[b]) n_b2b++;
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (30) @(posedge clk);

    check($sformatf("blocks out %0d of %0d", ob, NBLK), ob == NBLK);
    // coefficient accuracy
    for (int b = 0; b < NBLK; b++)
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          e = real'(blk_out[b][u][v]) - ref_coef(b, u, v);
          if (e < 0.0) e = -e;
          if (e > max_err) max_err = e;
          check($sformatf("block %0d Y[%0d][%0d] = %0d ref %f", b, u, v,
                          blk_out[b][u][v], ref_coef(b, u, v)), e <= 3.0);
        end
    // image reconstruction
    mse = 0.0;
    for (int b = 0; b < NBX * NBX; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          rec = 0.0;
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++)
              rec += cosm[u][r] * cosm[v][c] * real'(blk_out[b][u][v]);
          mse += (rec - real'(blk_in[b][r][c])) * (rec - real'(blk_in[b][r][c]));
        end
    mse = mse / real'(IMG * IMG);
    psnr = 10.0 * $log10(255.0 * 255.0 / mse);
    $display("max coefficient error %f, image PSNR %f dB", max_err, psnr);
    check($sformatf("PSNR %f", psnr), psnr >= 40.0);

    $display("bank swaps %0d, idle clocks inside blocks %0d, back-to-back blocks %0d, latency checks %0d, |Y|>=2000 %0d",
             n_swap, n_bubble, n_b2b, n_lat, n_big);
    check("bank swaps", n_swap == NBLK);
    check("idle clocks inside blocks", n_bubble > 0);
    check("back-to-back blocks", n_b2b > 0 && n_lat == n_b2b);
    check("coefficients near the 12-bit limit", n_big > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
