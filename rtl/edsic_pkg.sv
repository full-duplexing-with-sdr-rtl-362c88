// edsic_pkg: shared types and fixed-point conventions of the full-duplex
// transceiver and its extended Hammerstein self-interference canceller (eDSIC).
//
// Sample format: the transmit samples x[n], the received samples d[n] and the
// cancelled output e[n] are complex 16-bit values with 4 integer bits (sign
// included) and 12 fractional bits, i.e. Q4.12 spanning -8..+8. This follows
// the document. All other widths below are this design's own choices:
//   * internal model signals r[n], t[n], s[n] are 18-bit Q6.12 (one operand of
//     an 18x25 multiplier),
//   * datapath coefficients w, q, h are 18-bit Q3.15,
//   * each coefficient is kept in a 32-bit accumulator with 28 fractional bits
//     so that small LMS steps are not lost; the datapath uses the accumulator
//     shifted right by 13 and saturated to 18 bits.
package edsic_pkg;

  localparam int SAMPLE_W = 16;   // x, d, e: Q4.12
  localparam int SAMPLE_F = 12;
  localparam int SIG_W    = 18;   // r, t, s: Q6.12
  localparam int SIG_F    = 12;
  localparam int COEF_W   = 18;   // w, q, h datapath value: Q3.15
  localparam int COEF_F   = 15;
  localparam int ACC_W    = 32;   // coefficient accumulator, 28 fractional bits
  localparam int ACC_F    = 28;
  localparam int MU_W     = 5;    // step size given as a right shift: mu = 2^-shift
  localparam int BASIS_W  = 13;   // spline basis values, unsigned Q1.12

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } sample_t;

  typedef struct packed {
    logic signed [SIG_W-1:0] re;
    logic signed [SIG_W-1:0] im;
  } sig_t;

  typedef struct packed {
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  typedef struct packed {
    logic signed [ACC_W-1:0] re;
    logic signed [ACC_W-1:0] im;
  } acc_t;

  // Saturate a wide signed value to an 18-bit signal / coefficient word.
  function automatic logic signed [17:0] sat18(input logic signed [63:0] v);
    if (v > 64'sd131071)       return 18'sd131071;
    else if (v < -64'sd131072) return -18'sd131072;
    else                       return v[17:0];
  endfunction

  // Saturate a wide signed value to a 16-bit sample word.
  function automatic logic signed [15:0] sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sd32767;
    else if (v < -64'sd32768) return -16'sd32768;
    else                      return v[15:0];
  endfunction

  // Saturate a wide signed value to a 32-bit accumulator word.
  function automatic logic signed [31:0] sat32(input logic signed [63:0] v);
    if (v > 64'sd2147483647)       return 32'sh7fffffff;
    else if (v < -64'sd2147483648) return 32'sh80000000;
    else                           return v[31:0];
  endfunction

  // Datapath value of a coefficient accumulator (Q3.28 -> Q3.15).
  function automatic coef_t acc2coef(input acc_t a);
    coef_t c;
    c.re = sat18(64'(a.re >>> (ACC_F - COEF_F)));
    c.im = sat18(64'(a.im >>> (ACC_F - COEF_F)));
    return c;
  endfunction

endpackage
