// preamble_gen_pkg: stimulus helpers for the synchronizer testbenches.
//
// Generates, with real arithmetic, the 802.11a/g OFDM preamble at 20 MHz
// (ten 16-sample short symbols, a 32-sample guard interval and two 64-sample
// long symbols) and an 802.11b DSSS preamble (random +-1 symbols at 1 MHz
// spread by the 11-chip Barker code at 11 MHz), both read on a 20 MHz time
// grid and quantised to 8-bit I/Q with saturation. The long symbol is
//     LT(n) = sum_{k=-26..26} L_k exp(j 2 pi k n / 64),
// the short symbol S(n) = sqrt(13/6) sum_k S_k exp(j 2 pi k n / 64) with the
// 12 non-zero S_k of the standard.
package preamble_gen_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int lt_coef(int k);   // k = -26..26
    int tab [53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,
                     0,1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
    return tab[k + 26];
  endfunction

  function automatic void lt_sample(int n, output real re, output real im);
    re = 0.0; im = 0.0;
    for (int k = -26; k <= 26; k++) begin
      re += lt_coef(k) * $cos(2.0*PI*k*n/64.0);
      im += lt_coef(k) * $sin(2.0*PI*k*n/64.0);
    end
  endfunction

  // non-zero short-training coefficients: (1+j) or -(1+j) at k = 4m
  function automatic int st_coef(int k);
    case (k)
      -24, -16, -4, 12, 16, 20, 24: return 1;
      -20, -12, -8, 4, 8:           return -1;
      default:                      return 0;
    endcase
  endfunction

  function automatic void st_sample(int n, output real re, output real im);
    real g = $sqrt(13.0/6.0);
    re = 0.0; im = 0.0;
    for (int k = -26; k <= 26; k++) begin
      // (1+j) e^{j th} = (cos - sin) + j (cos + sin)
      re += g * st_coef(k) * ($cos(2.0*PI*k*n/64.0) - $sin(2.0*PI*k*n/64.0));
      im += g * st_coef(k) * ($cos(2.0*PI*k*n/64.0) + $sin(2.0*PI*k*n/64.0));
    end
  endfunction

  function automatic int sat8(real v);
    int i = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (i > 127)  i = 127;
    if (i < -128) i = -128;
    return i;
  endfunction

  // OFDM preamble sample n (0..319) on the 20 MHz grid, scaled to 8 bits
  function automatic void ofdm_preamble(int n, real scale, output int re, output int im);
    real r, i;
    if (n < 160)      st_sample(n % 16, r, i);
    else if (n < 192) lt_sample(n - 160 + 32, r, i);
    else              lt_sample((n - 192) % 64, r, i);
    re = sat8(r * scale);
    im = sat8(i * scale);
  endfunction

  function automatic bit barker_neg(int k);
    bit [10:0] b = 11'b111_0001_0010;   // + - + + - + + + - - -
    return b[k];
  endfunction

endpackage
