// tb_dao: checks the DA odd processing element.
// For random b0..b3 the DA words of Z1, Z3, Z5, Z7 must recombine into
// sum_c round(256*cos((2c+1)n*pi/16)) * b_c, with the cosines worked out
// here with $cos. The Z1 words are also compared with the bit-level
// formulation of Z1 (y0 = 0, y1 = b0+b1+b2, y2 = b0+b1, y3 = b0+b3,
// y4 = b0+b1+b3, y5 = b0+b2).
module tb_dao;
  localparam int Q  = 9;
  localparam int IW = 10;
  localparam int WW = 12;
  localparam real PI = 3.14159265358979323846;

  logic signed [IW-1:0] b [4];
  logic signed [WW-1:0] y [4][Q];
  int checks = 0, failures = 0;

  dao #(.IW(IW), .WW(WW)) dut (.b(b), .y(y));

  function automatic int cq(input int n, input int m);
    return int'($floor(256.0 * $cos(real'((2*m+1)*n) * PI / 16.0) + 0.5));
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
    int bi [4];
    int e;
    for (int t = 0; t < 1000; t++) begin
      for (int c = 0; c < 4; c++) begin
        bi[c] = (t == 0) ? -512 : (t == 1) ? 511 : int'($urandom_range(0, 1023)) - 512;
        b[c] = IW'(bi[c]);
      end
      #1;
      for (int r = 0; r < 4; r++) begin
        e = 0;
        for (int c = 0; c < 4; c++) e += cq(2*r+1, c) * bi[c];
        check($sformatf("Z%0d", 2*r+1), recombine(y[r]), e);
      end
      check("Z1 y0", int'(y[0][0]), 0);
      check("Z1 y1", int'(y[0][1]), bi[0] + bi[1] + bi[2]);
      check("Z1 y2", int'(y[0][2]), bi[0] + bi[1]);
      check("Z1 y3", int'(y[0][3]), bi[0] + bi[3]);
      check("Z1 y4", int'(y[0][4]), bi[0] + bi[1] + bi[3]);
      check("Z1 y5", int'(y[0][5]), bi[0] + bi[2]);
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
