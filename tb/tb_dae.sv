// tb_dae: checks both DA even processing elements.
// For random inputs the DA words must recombine, with weights -2^0 and
// 2^-j, into the inner product with the coefficients round(256*cos(k*pi/16))
// worked out here with $cos. The Z4 words are also compared one by one with
// the bit-level formulation of Z4 (y0 = A1, y1 = A0, y2 = A1, y3 = A0,
// y4 = A0, y5 = A1, ...).
module tb_dae;
  localparam int Q  = 9;
  localparam int IW = 11;
  localparam int WW = 12;
  localparam real PI = 3.14159265358979323846;

  logic signed [IW-1:0] in0 [2], in1 [2];
  logic signed [WW-1:0] y0 [2][Q], y1 [2][Q];
  int checks = 0, failures = 0;

  dae #(.PAIR(0), .IW(IW), .WW(WW)) dut0 (.in(in0), .y(y0));
  dae #(.PAIR(1), .IW(IW), .WW(WW)) dut1 (.in(in1), .y(y1));

  function automatic int cq(input int k);  // quantized cosine, sign kept
    return int'($floor(256.0 * $cos(real'(k) * PI / 16.0) + 0.5));
  endfunction

  function automatic int recombine(input logic signed [WW-1:0] w [Q]);
    int s = -int'(w[0]) * 256;
    for (int j = 1; j < Q; j++) s += int'(w[j]) * (1 << (8 - j));
    return s;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int p, q, r, s;
    for (int t = 0; t < 1000; t++) begin
      p = int'($urandom_range(0, 2047)) - 1024;
      q = int'($urandom_range(0, 2047)) - 1024;
      r = int'($urandom_range(0, 2047)) - 1024;
      s = int'($urandom_range(0, 2047)) - 1024;
      in0[0] = IW'(p); in0[1] = IW'(q);
      in1[0] = IW'(r); in1[1] = IW'(s);
      #1;
      check("Z0", recombine(y0[0]), cq(4) * p + cq(4) * q);
      check("Z4", recombine(y0[1]), cq(4) * p - cq(4) * q);
      check("Z2", recombine(y1[0]), cq(2) * r + cq(6) * s);
      check("Z6", recombine(y1[1]), cq(6) * r - cq(2) * s);
      check("Z4 y0", int'(y0[1][0]), q);
      check("Z4 y1", int'(y0[1][1]), p);
      check("Z4 y2", int'(y0[1][2]), q);
      check("Z4 y3", int'(y0[1][3]), p);
      check("Z4 y4", int'(y0[1][4]), p);
      check("Z4 y5", int'(y0[1][5]), q);
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
