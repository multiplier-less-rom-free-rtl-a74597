// tb_dct_butterfly: checks the twelve butterfly adders/subtractors against
// sums computed here in plain integer arithmetic, for random and extreme
// 9-bit inputs.
module tb_dct_butterfly;
  localparam int IN_W = 9;
  logic signed [IN_W-1:0] x [8];
  logic signed [IN_W:0]   b [4];
  logic signed [IN_W+1:0] ea [2];
  logic signed [IN_W+1:0] eb [2];
  int checks = 0, failures = 0;

  dct_butterfly #(.IN_W(IN_W)) dut (.x(x), .b(b), .ea(ea), .eb(eb));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int xi [8];
    int a [4];
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 8; i++) begin
        if (t == 0) xi[i] = -256;
        else if (t == 1) xi[i] = 255;
        else if (t == 2) xi[i] = (i < 4) ? 255 : -256;
        else xi[i] = int'($urandom_range(0, 511)) - 256;
        x[i] = IN_W'(xi[i]);
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        a[i] = xi[i] + xi[7-i];
        check($sformatf("b%0d", i), int'(b[i]), xi[i] - xi[7-i]);
      end
      check("A0", int'(ea[0]), a[0] + a[3]);
      check("A1", int'(ea[1]), a[1] + a[2]);
      check("B0", int'(eb[0]), a[0] - a[3]);
      check("B1", int'(eb[1]), a[1] - a[2]);
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
