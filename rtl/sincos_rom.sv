// sincos_rom: combinational cosine/sine look-up for a binary phase.
//
// The phase input is a fraction of a full turn (PW bits, 2^PW = 2*pi); it is
// rounded to 10 bits, which address a 1024-entry sine table computed at
// elaboration from sin(2*pi*i/1024) scaled to 20 fractional bits. Cosine is
// read from the same table a quarter turn ahead. The residual of the
// rounding (d, at most half a table step) is corrected to first order,
// sin(x+d) ~ sin x + d cos x and cos(x+d) ~ cos x - d sin x, which brings
// the error from about 3e-3 to about 5e-6. Used by the fading generators,
// the noise generator and the array-coefficient calculator; the table size
// and the correction are this design's choice. No clock: output follows the
// input combinationally.
module sincos_rom
  import chsim_pkg::*;
#(
  parameter int unsigned PW = 16
) (
  input  logic [PW-1:0] phase,
  output smp_t          cos_o,
  output smp_t          sin_o
);
  localparam sin_tab_t TAB = make_sin_tab();
  logic [LUT_AW-1:0] idx;
  logic [PW-1:0] rnd;
  // round to the nearest table entry (wraps at a full turn)
  assign rnd   = phase + PW'(1 << (PW - LUT_AW - 1));
  assign idx   = rnd[PW-1 -: LUT_AW];
  // 2*pi with 16 fractional bits
  localparam logic signed [19:0] TWO_PI_Q16 = 20'sd411775;
  localparam int unsigned SH  = PW + 16;
  localparam int unsigned DBW = PW - LUT_AW + 1;
  localparam int unsigned SBW = $bits(smp_t);
  smp_t s0, c0;
  logic signed [DBW-1:0]        d;
  logic signed [SBW+DBW-1:0]    pc, ps;
  smp_t                         ds, dc;
  assign s0 = TAB[idx];
  assign c0 = TAB[idx + LUT_AW'(2**(LUT_AW-2))];
  // residual phase in input LSBs, -2^(PW-LUT_AW-1) .. 2^(PW-LUT_AW-1)-1
  assign d  = $signed({1'b0, rnd[PW-LUT_AW-1:0]}) - $signed(DBW'(1 << (PW - LUT_AW - 1)));
  // narrow products: table value times residual, then times the constant
  assign pc = (SBW+DBW)'(c0) * (SBW+DBW)'(d);
  assign ps = (SBW+DBW)'(s0) * (SBW+DBW)'(d);
  assign ds = SBW'(((SBW+DBW+20)'(pc) * (SBW+DBW+20)'(TWO_PI_Q16)) >>> SH);
  assign dc = SBW'(((SBW+DBW+20)'(ps) * (SBW+DBW+20)'(TWO_PI_Q16)) >>> SH);
  assign sin_o = s0 + ds;
  assign cos_o = c0 - dc;
endmodule
