// dct_pkg: constants shared by the 8x8 DA-based DCT.
//
// The DCT coefficients C_k = cos(k*pi/16) are held as Q-bit two's complement
// fractions with Q-1 fractional bits (DA precision Q = 9, as the design
// specifies), i.e. the integers round(256 * cos(k*pi/16)):
//   C1 = 251, C2 = 237, C3 = 213, C4 = 181, C5 = 142, C6 = 98, C7 = 50.
// Bit Q-1 of a coefficient has weight -2^0 and bit Q-1-j has weight 2^-j,
// so the DA word y_j of an inner product sum_i C_i*x_i is the sum of the x_i
// whose coefficient has bit Q-1-j set. A negative coefficient such as -C4
// (-181 = 1_0100_1011) therefore contributes through its sign bit to y_0.
//
// even_coef/odd_coef give the rows of the even and odd 4x4 matrices of the
// 1-D 8-point DCT split into Z_e = [Z0 Z2 Z4 Z6] and Z_o = [Z1 Z3 Z5 Z7].
package dct_pkg;

  localparam int Q = 9;   // DA precision in bits (weights -2^0 .. 2^-8)

  typedef logic signed [Q-1:0] coef_t;

  // round(256 * cos(k*pi/16)), k = 0..7 (k = 0 is not needed)
  function automatic coef_t ck(input int k);
    case (k)
      1: return 251;
      2: return 237;
      3: return 213;
      4: return 181;
      5: return 142;
      6: return 98;
      7: return 50;
      default: return '0;
    endcase
  endfunction

  // Even part. pair 0: Z0 = C4*A0 + C4*A1, Z4 = C4*A0 - C4*A1
  //            pair 1: Z2 = C2*B0 + C6*B1, Z6 = C6*B0 - C2*B1
  // row 0 gives the first output of the pair, row 1 the second.
  function automatic coef_t even_coef(input int pair, input int row, input int col);
    coef_t v;
    if (pair == 0) v = (row == 1 && col == 1) ? -ck(4) : ck(4);
    else if (row == 0) v = (col == 0) ? ck(2) : ck(6);
    else v = (col == 0) ? ck(6) : -ck(2);
    return v;
  endfunction

  // Odd part: Z_(2*row+1) = sum_col odd_coef(row, col) * b_col
  function automatic coef_t odd_coef(input int row, input int col);
    coef_t v;
    case (row*4 + col)
      0:  v =  ck(1);  1: v =  ck(3);  2: v =  ck(5);  3: v =  ck(7);
      4:  v =  ck(3);  5: v = -ck(7);  6: v = -ck(1);  7: v = -ck(5);
      8:  v =  ck(5);  9: v = -ck(1); 10: v =  ck(7); 11: v =  ck(3);
      12: v =  ck(7); 13: v = -ck(5); 14: v =  ck(3); 15: v = -ck(1);
      default: v = '0;
    endcase
    return v;
  endfunction

endpackage
