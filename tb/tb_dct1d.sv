// tb_dct1d: checks the 1-D 8-point DCT core at the first-stage setting
// (9-bit input, 12-bit output, registered output).
// Random vectors, mostly back to back with occasional idle clocks, are
// driven; each result must be within 1 of round(sum_m x_m * C(n,m) / 256)
// with C(n,m) = round(256 * k_n * cos((2m+1) n pi / 16)) worked out here,
// and within 3 of the exact real-valued transform. Each result must leave
// exactly 2 clocks after its input was taken, in order, one per clock.
module tb_dct1d;
  localparam int IN_W = 9;
  localparam int OUT_W = 12;
  localparam int NV = 3000;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0]  x [8];
  logic out_valid;
  logic signed [OUT_W-1:0] z [8];
  int checks = 0, failures = 0;
  int cyc = 0;

  dct1d dut (.clk, .rst_n, .in_valid, .x, .out_valid, .z);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int cq(input int n, input int m);
    real k = (n == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return int'($floor(256.0 * k * $cos(real'((2*m+1)*n) * PI / 16.0) + 0.5));
  endfunction

  function automatic real cr(input int n, input int m);
    real k = (n == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return k * $cos(real'((2*m+1)*n) * PI / 16.0);
  endfunction

  typedef struct {
    int x [8];
    int t;
  } vec_t;
  vec_t q [$];
  int received = 0;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      vec_t v;
      int e;
      real er;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        v = q.pop_front();
        received++;
        checks++;
        if (cyc - v.t != 2) begin
          failures++;
          $display("FAIL latency %0d", cyc - v.t);
        end
        for (int n = 0; n < 8; n++) begin
          e = 0;
          er = 0.0;
          for (int m = 0; m < 8; m++) begin
            e += cq(n, m) * v.x[m];
            er += cr(n, m) * real'(v.x[m]);
          end
          e = (e + 128) >>> 8;
          checks += 2;
          if (int'(z[n]) - e > 1 || e - int'(z[n]) > 1) begin
            failures++;
            $display("FAIL Z%0d got %0d expected %0d", n, z[n], e);
          end
          if (real'(z[n]) - er > 3.0 || er - real'(z[n]) > 3.0) begin
            failures++;
            $display("FAIL Z%0d got %0d real %f", n, z[n], er);
          end
        end
      end
    end
  end

  initial begin
    vec_t v;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < NV; i++) begin
      @(posedge clk);
      if ($urandom_range(0, 7) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      for (int m = 0; m < 8; m++) begin
        v.x[m] = (i == 0) ? -256 : (i == 1) ? 255 : int'($urandom_range(0, 511)) - 256;
        x[m] <= IN_W'(v.x[m]);
      end
      v.t = cyc + 1;  // cyc is updated by a nonblocking assignment at this edge
      q.push_back(v);
      in_valid <= 1'b1;
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (received != NV) begin
      failures++;
      $display("FAIL received %0d of %0d", received, NV);
    end
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
