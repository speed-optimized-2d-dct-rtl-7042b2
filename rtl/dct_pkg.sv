// dct_pkg: constants shared by the distributed-arithmetic 8x8 DCT.
//
// The 8-point DCT is computed in Chen's even/odd split form. After the first
// butterfly the four sums s[i] = x[i] + x[7-i] feed the even coefficients
// X0, X2, X4, X6 and the four differences d[i] = x[i] - x[7-i] feed the odd
// coefficients X1, X3, X5, X7, each through a 4x4 matrix:
//
//   X0 = [ A  A  A  A ] s      X1 = [ D  E  F  G ] d
//   X2 = [ B  C -C -B ] s      X3 = [ E -G -D -F ] d
//   X4 = [ A -A -A  A ] s      X5 = [ F -D  G  E ] d
//   X6 = [ C -B  B -C ] s      X7 = [ G -F  E -D ] d
//
// with A..G = sqrt(2)*cos(k*pi/16) scaled by 64 and rounded to the integers
// A=64 (k=4), B=83 (k=2), C=36 (k=6), D=89 (k=1), E=75 (k=3), F=50 (k=5),
// G=18 (k=7). These are the integer multiplicands of the 8-point integer
// cosine transform. COEF[k][i] is the weight of butterfly output i in X_k.
package dct_pkg;

  localparam int unsigned N = 8;           // points per 1D transform
  localparam int unsigned HALF = N / 2;    // butterfly outputs per half
  localparam int unsigned ROM_W = 10;      // width of one DA ROM word
  localparam int unsigned ACC_W = 20;      // width of the RAC accumulator

  localparam int COEF_A = 64;
  localparam int COEF_B = 83;
  localparam int COEF_C = 36;
  localparam int COEF_D = 89;
  localparam int COEF_E = 75;
  localparam int COEF_F = 50;
  localparam int COEF_G = 18;

  // Weight of butterfly output i (sum for even k, difference for odd k) in X_k.
  function automatic int coef(logic [2:0] k, logic [1:0] i);
    case ({k, i})
      5'o00, 5'o01, 5'o02, 5'o03: return COEF_A;                    // X0
      5'o04: return  COEF_D;  5'o05: return  COEF_E;                 // X1
      5'o06: return  COEF_F;  5'o07: return  COEF_G;
      5'o10: return  COEF_B;  5'o11: return  COEF_C;                 // X2
      5'o12: return -COEF_C;  5'o13: return -COEF_B;
      5'o14: return  COEF_E;  5'o15: return -COEF_G;                 // X3
      5'o16: return -COEF_D;  5'o17: return -COEF_F;
      5'o20: return  COEF_A;  5'o21: return -COEF_A;                 // X4
      5'o22: return -COEF_A;  5'o23: return  COEF_A;
      5'o24: return  COEF_F;  5'o25: return -COEF_D;                 // X5
      5'o26: return  COEF_G;  5'o27: return  COEF_E;
      5'o30: return  COEF_C;  5'o31: return -COEF_B;                 // X6
      5'o32: return  COEF_B;  5'o33: return -COEF_C;
      5'o34: return  COEF_G;  5'o35: return -COEF_F;                 // X7
      5'o36: return  COEF_E;  default: return -COEF_D;
    endcase
  endfunction

  // Content of the DA ROM of X_k at a 4-bit address: the sum of the weights
  // of the butterfly outputs whose bit is set in the address (bit i of the
  // address is the current bit of butterfly output i).
  function automatic int rom_word(logic [2:0] k, logic [HALF-1:0] addr);
    int sum = 0;
    for (int unsigned i = 0; i < HALF; i++)
      if (addr[i]) sum += coef(k, 2'(i));
    return sum;
  endfunction

  // Number of cycles a RAC needs for a word of w bits taken p bits per cycle.
  function automatic int unsigned slices(int unsigned w, int unsigned p);
    return (w + p - 1) / p;
  endfunction

endpackage
