// tb_da_butterfly_matrix: checks the complete DA-butterfly-matrix.
// For random 9-bit input vectors, the words of every output Z_n must
// recombine into sum_m x_m * round(256 * k_n * cos((2m+1) n pi / 16)),
// k_0 = 1/sqrt(2), k_n = 1 otherwise, worked out here with $cos.
module tb_da_butterfly_matrix;
  localparam int Q    = 9;
  localparam int IN_W = 9;
  localparam int WW   = 12;
  localparam real PI  = 3.14159265358979323846;

  logic signed [IN_W-1:0] x [8];
  logic signed [WW-1:0]   y [8][Q];
  int checks = 0, failures = 0;

  da_butterfly_matrix #(.IN_W(IN_W), .WW(WW)) dut (.x(x), .y(y));

  function automatic int cq(input int n, input int m);
    real k = (n == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return int'($floor(256.0 * k * $cos(real'((2*m+1)*n) * PI / 16.0) + 0.5));
  endfunction

  function automatic int recombine(input logic signed [WW-1:0] w [Q]);
    int s = -int'(w[0]) * 256;
    for (int j = 1; j < Q; j++) s += int'(w[j]) * (1 << (8 - j));
    return s;
  endfunction

  initial begin
    int xi [8];
    int e;
    for (int t = 0; t < 1000; t++) begin
      for (int m = 0; m < 8; m++) begin
        xi[m] = (t == 0) ? -256 : (t == 1) ? 255 : int'($urandom_range(0, 511)) - 256;
        x[m] = IN_W'(xi[m]);
      end
      #1;
      for (int n = 0; n < 8; n++) begin
        e = 0;
        for (int m = 0; m < 8; m++) e += cq(n, m) * xi[m];
        checks++;
        if (recombine(y[n]) != e) begin
          failures++;
          $display("FAIL Z%0d: got %0d expected %0d", n, recombine(y[n]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
