// dct_pkg: constants and coefficient helpers shared by the DA-based 8x8 DCT.
//
// The 1-D DCT is computed with distributed arithmetic (DA): every cosine
// coefficient is stored as a DA_Q-bit two's complement binary fraction,
// bit 0 carrying the weight -2^0 and bit j (j > 0) the weight 2^-j.
// Ck = floor(cos(k*pi/16) * 2^(DA_Q-1)), magnitude truncated and the sign
// applied afterwards; for DA_Q = 9 this gives C1..C7 = 251, 236, 212, 181,
// 142, 97, 49.  C4 = 181 reproduces the published bit pattern of Z0/Z4.
// The source does not say how it quantised the coefficients; truncation is
// chosen because the odd part then needs exactly nine distinct input sums,
// the published adder count (rounding would need ten).
// The coefficient matrices are given as signed cosine indices (+k means Ck,
// -k means -Ck), row = output, column = input of the DA element.
// Widths: 9-bit pixels in, 12-bit transpose buffer, 12-bit coefficients out
// follow the source design; nothing here is clocked.
package dct_pkg;

  localparam int DA_Q   = 9;   // DA precision (bits per coefficient)
  localparam int IN_W   = 9;   // 2-D core input sample width
  localparam int TB_W   = 12;  // transpose buffer word length
  localparam int OUT_W  = 12;  // 2-D core output width

  // Even-even part: [Z0 Z4] = [[C4 C4] [C4 -C4]] * [A0 A1]
  localparam int EE_K00 = 4, EE_K01 = 4, EE_K10 = 4, EE_K11 = -4;
  // Even-odd part:  [Z2 Z6] = [[C2 C6] [C6 -C2]] * [B0 B1]
  localparam int EO_K00 = 2, EO_K01 = 6, EO_K10 = 6, EO_K11 = -2;

  // Odd part, rows Z1 Z3 Z5 Z7, columns b0..b3 (b_i = x_i - x_(7-i)).
  function automatic int odd_k(int n, int i);
    case (n * 4 + i)
      0:  return  1;  1: return  3;  2: return  5;  3: return  7;
      4:  return  3;  5: return -7;  6: return -1;  7: return -5;
      8:  return  5;  9: return -1; 10: return  7; 11: return  3;
      12: return  7; 13: return -5; 14: return  3; default: return -1;
    endcase
  endfunction

  // Integer DA coefficient for signed cosine index k at precision q.
  function automatic int coef(int k, int q);
    int  a;
    real v;
    a = (k < 0) ? -k : k;
    v = $cos(real'(a) * 3.14159265358979323846 / 16.0) * (2.0 ** (q - 1));
    return (k < 0) ? -$rtoi($floor(v)) : $rtoi($floor(v));
  endfunction

  // DA bit j of a q-bit coefficient c: j = 0 is the sign bit (weight -1),
  // j > 0 has weight 2^-j.
  function automatic bit coef_bit(int c, int j, int q);
    return bit'((c >>> (q - 1 - j)) & 1);
  endfunction

endpackage
