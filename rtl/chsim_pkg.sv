// chsim_pkg: types, constants and arithmetic helpers shared by the channel
// simulator and the parameter estimator.
//
// Channel-simulator samples are complex, 24-bit two's complement per rail
// (I and Q), as in the simulator's 24-bit fixed-point datapath. This design
// places the binary point at 20 fractional bits (range +-8), which leaves
// headroom for the sum of several paths, interference and noise.
// Estimator arithmetic is 32-bit fixed point with 24 fractional bits
// (range +-128); the 32-bit word length follows the estimator chip set, the
// split between integer and fraction bits is this design's choice.
package chsim_pkg;

  localparam int unsigned DW   = 24;   // sample word per rail
  localparam int unsigned FRAC = 20;   // fractional bits of DW words
  localparam int unsigned EW   = 32;   // estimator word
  localparam int unsigned EFRAC = 24;  // fractional bits of EW words

  localparam int unsigned N_ELEM  = 8;   // antenna elements
  localparam int unsigned K_DES   = 3;   // path channels of the desired-user unit
  localparam int unsigned K_INT   = 2;   // path channels of the interferer unit
  localparam int unsigned K0      = K_DES + K_INT;
  localparam int unsigned M_MAX   = 16;  // component waves per fading path
  localparam int unsigned DELAY_MAX = 125; // 5.2 us in 1/24 MHz steps

  typedef logic signed [DW-1:0] smp_t;
  typedef struct packed { smp_t re; smp_t im; } cplx_t;    // 48 bits
  typedef logic signed [EW-1:0] ew_t;
  typedef struct packed { ew_t re; ew_t im; } ecplx_t;     // 64 bits

  localparam smp_t ONE = smp_t'(1 << FRAC);
  localparam ew_t  EONE = ew_t'(1 << EFRAC);

  // Saturate a wide signed value to DW bits.
  function automatic smp_t sat(input logic signed [63:0] v);
    if (v > 64'sd8388607)       return smp_t'(24'sh7FFFFF);
    else if (v < -64'sd8388608) return smp_t'(24'sh800000);
    else                        return smp_t'(v);
  endfunction

  // Fixed-point real product a*b (both FRAC), rounded down, saturated.
  function automatic smp_t rmul(input smp_t a, input smp_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return sat(p >>> FRAC);
  endfunction

  // Complex product a*b.
  function automatic cplx_t cmul(input cplx_t a, input cplx_t b);
    logic signed [63:0] r, i;
    cplx_t y;
    r = 64'(a.re) * 64'(b.re) - 64'(a.im) * 64'(b.im);
    i = 64'(a.re) * 64'(b.im) + 64'(a.im) * 64'(b.re);
    y.re = sat(r >>> FRAC);
    y.im = sat(i >>> FRAC);
    return y;
  endfunction

  // Real scalar times complex.
  function automatic cplx_t cscale(input cplx_t a, input smp_t g);
    cplx_t y;
    y.re = rmul(a.re, g);
    y.im = rmul(a.im, g);
    return y;
  endfunction

  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    cplx_t y;
    y.re = sat(64'(a.re) + 64'(b.re));
    y.im = sat(64'(a.im) + 64'(b.im));
    return y;
  endfunction

  // Estimator product (EFRAC), truncated to EW bits.
  function automatic ew_t emul(input ew_t a, input ew_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return ew_t'(p >>> EFRAC);
  endfunction

  // One full sine period in a 2^10-entry table, value scaled by 2^FRAC.
  localparam int unsigned LUT_AW = 10;
  typedef logic signed [DW-1:0] sin_tab_t [2**LUT_AW];
  function automatic sin_tab_t make_sin_tab();
    sin_tab_t t;
    for (int i = 0; i < 2**LUT_AW; i++)
      t[i] = smp_t'($rtoi($floor($sin(6.283185307179586 * i / (2.0 ** LUT_AW)) * (2.0 ** FRAC) + 0.5)));
    return t;
  endfunction

endpackage
