// tb_oat: checks the optimized adder tree in both configurations of the
// 2-D core: first stage (12-bit words, integer output) and second stage
// (15-bit words, output scaled by 1/4 and saturated).
// The exact value S = -y0*2^8 + sum_j y_j*2^(8-j) is formed here in 64-bit
// integers. Each output must lie within 1 of round(S / 2^T), the mean error
// over all samples must be below 0.1 in magnitude (plain truncation of the
// dropped columns would give about -0.5) and at least 3/4 of the outputs
// must be exactly the rounded value. Large sums check the saturation of the
// second configuration.
module tb_oat;
  localparam int Q = 9;
  localparam int NS = 20000;

  logic signed [11:0] ya [Q];
  logic signed [11:0] za;
  logic signed [14:0] yb [Q];
  logic signed [11:0] zb;
  int checks = 0, failures = 0;

  oat #(.WW(12), .Q(Q), .OUT_W(12), .OUT_SHIFT(0), .TP_MAJOR(3), .SAT(1'b0)) dut_a (.y(ya), .z(za));
  oat #(.WW(15), .Q(Q), .OUT_W(12), .OUT_SHIFT(2), .TP_MAJOR(3), .SAT(1'b1)) dut_b (.y(yb), .z(zb));

  function automatic longint rnd_div(input longint s, input int t);
    // round to nearest, halves upward
    return (s + (longint'(1) << (t - 1))) >>> t;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint s, e;
    longint sum_err_a = 0, sum_err_b = 0;
    int exact_a = 0, exact_b = 0;
    int lim;
    for (int t = 0; t < NS; t++) begin
      // keep the exact result inside the 12-bit range of configuration a
      lim = 200;
      for (int j = 0; j < Q; j++) begin
        ya[j] = 12'(int'($urandom_range(0, 2*lim)) - lim);
        yb[j] = 15'(int'($urandom_range(0, 2*1600)) - 1600);
      end
      #1;
      s = -longint'(ya[0]) * 256;
      for (int j = 1; j < Q; j++) s += longint'(ya[j]) << (8 - j);
      e = rnd_div(s, 8);
      check($sformatf("a: got %0d exact %0d", za, e), (za - e) <= 1 && (e - za) <= 1);
      sum_err_a += longint'(za) - e;
      if (longint'(za) == e) exact_a++;

      s = -longint'(yb[0]) * 256;
      for (int j = 1; j < Q; j++) s += longint'(yb[j]) << (8 - j);
      e = rnd_div(s, 10);
      check($sformatf("b: got %0d exact %0d", zb, e), (zb - e) <= 1 && (e - zb) <= 1);
      sum_err_b += longint'(zb) - e;
      if (longint'(zb) == e) exact_b++;
    end
    $display("mean error a %f, exact %0d of %0d", real'(sum_err_a) / NS, exact_a, NS);
    $display("mean error b %f, exact %0d of %0d", real'(sum_err_b) / NS, exact_b, NS);
    check("mean error a", real'(sum_err_a) / NS < 0.1 && real'(sum_err_a) / NS > -0.1);
    check("mean error b", real'(sum_err_b) / NS < 0.1 && real'(sum_err_b) / NS > -0.1);
    check("exact share a", exact_a * 4 >= NS * 3);
    check("exact share b", exact_b * 4 >= NS * 3);

    // saturation of configuration b: +/-16383*(2^8 + ...) / 2^10 is far out
    for (int j = 0; j < Q; j++) yb[j] = 15'(16000);
    yb[0] = 15'(-16000);
    #1;
    check($sformatf("saturate high: %0d", zb), zb == 12'sd2047);
    for (int j = 0; j < Q; j++) yb[j] = 15'(-16000);
    yb[0] = 15'(16000);
    #1;
    check($sformatf("saturate low: %0d", zb), zb == -12'sd2048);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
