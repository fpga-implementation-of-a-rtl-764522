// mclt_pkg: number formats, sizes and the c(k) modulation table shared by the
// direct and inverse MCLT butterfly-like stages.
//
// Fixed-point formats are written aQb: a integer bits, b fraction bits, plus a
// sign bit. The formats follow the design's system constraints:
//   * time samples x(n) entering the FFT are Q15 (16 bits),
//   * FFT outputs U(k) and MCLT coefficients X(k) are 9Q15 (25 bits),
//   * the c(k) factors are Q15 (16 bits),
//   * watermarked coefficients entering the inverse stage and the Y(k) values
//     handed to the IFFT are 24 bits wide. Their binary point is not fixed by
//     the design documentation; this implementation keeps 15 fraction bits
//     (8Q15) so that an X(k) within range passes from one stage to the other
//     unscaled.
// The transform length M (block of M coefficients from 2M samples) is 128 by
// default; every module takes it as a parameter.
//
// c(k) = W_8(2k+1) * W_4M(k), with W_N(r) = exp(-j*2*pi*r/N), is generated here
// at elaboration time from its closed form, rounded to Q15 and saturated at
// +32767 (the value +1.0 occurs and is not representable in Q15).
package mclt_pkg;

  localparam int M_DEFAULT = 128;   // MCLT length: M coefficients per block

  localparam int XN_W  = 16;        // Q15 input samples of the direct FFT
  localparam int XK_W  = 25;        // 9Q15 FFT outputs and MCLT coefficients
  localparam int C_W   = 16;        // Q15 c(k) factors
  localparam int FRAC  = 15;        // fraction bits of every format
  localparam int WIN_W = 24;        // watermarked coefficients, inverse input
  localparam int Y_W   = 24;        // Y(k) values handed to the IFFT

  // One complex value per format, real part in the upper half.
  typedef struct packed {
    logic signed [XK_W-1:0] re;
    logic signed [XK_W-1:0] im;
  } xk_t;

  typedef struct packed {
    logic signed [C_W-1:0] re;
    logic signed [C_W-1:0] im;
  } coef_t;

  typedef struct packed {
    logic signed [WIN_W-1:0] re;
    logic signed [WIN_W-1:0] im;
  } win_t;

  typedef struct packed {
    logic signed [Y_W-1:0] re;
    logic signed [Y_W-1:0] im;
  } y_t;

  localparam real PI = 3.14159265358979323846;

  // Round a real in [-1, 1] to Q15 with saturation at the positive end.
  function automatic logic signed [C_W-1:0] to_q15(input real v);
    int q;
    q = int'($floor(v * 32768.0 + 0.5));
    if (q > 32767)  q = 32767;
    if (q < -32768) q = -32768;
    return q[C_W-1:0];
  endfunction

  // c(k) for an M-point MCLT; conj selects c*(k) for the inverse transform.
  // Angle of c(k): -2*pi*(2k+1)/8 - 2*pi*k/(4M).
  function automatic coef_t c_factor(input int k, input int m, input bit conj);
    real th;
    coef_t c;
    th = -2.0 * PI * real'(2 * k + 1) / 8.0 - 2.0 * PI * real'(k) / (4.0 * real'(m));
    if (conj) th = -th;
    c.re = to_q15($cos(th));
    c.im = to_q15($sin(th));
    return c;
  endfunction

endpackage
