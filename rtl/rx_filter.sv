// rx_filter: receiver filter applied to one element's signal.
//
// A direct-form FIR with TAPS real coefficients (20 fractional bits),
// applied to I and Q alike: y[i] = sum_t coef[t] * x[i-t]. The coefficients
// are loaded by the system controller to match the receiver filter that the
// experiment assumes; the filter length is this design's choice.
//
// Timing: one sample per clock where ce=1; `dout` is registered, so y[i]
// appears one ce after x[i] is presented.
module rx_filter
  import chsim_pkg::*;
#(
  parameter int unsigned TAPS = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  cplx_t din,
  input  smp_t  coef [TAPS],
  output cplx_t dout
);
  cplx_t              hist [TAPS];
  logic signed [63:0] acc_re, acc_im;

  always_comb begin
    acc_re = 64'(din.re) * 64'(coef[0]);
    acc_im = 64'(din.im) * 64'(coef[0]);
    for (int t = 1; t < TAPS; t++) begin
      acc_re += 64'(hist[t-1].re) * 64'(coef[t]);
      acc_im += 64'(hist[t-1].im) * 64'(coef[t]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout <= '0;
      for (int t = 0; t < TAPS; t++) hist[t] <= '0;
    end else if (ce) begin
      hist[0] <= din;
      for (int t = 1; t < TAPS; t++) hist[t] <= hist[t-1];
      dout.re <= sat(acc_re >>> FRAC);
      dout.im <= sat(acc_im >>> FRAC);
    end
  end
endmodule
