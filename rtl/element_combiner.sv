// element_combiner: the per-element summing points of the simulator.
//
// For every antenna element n, the element signals of the U user units are
// added, complex white Gaussian noise scaled by noise_lvl[n] (the standard
// deviation of I and of Q, 20 fractional bits) is added, and the sum passes
// through the receiver filter. The noise comes from awgn_gen; one rx_filter
// per element shares the coefficient set.
//
// Timing: one sample per clock where ce=1. Latency from user inputs to
// elem_out is two ce (sum register, filter register); uw_out is delayed
// to match.
module element_combiner
  import chsim_pkg::*;
#(
  parameter int unsigned U    = 2,
  parameter int unsigned N    = N_ELEM,
  parameter int unsigned TAPS = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  cplx_t user_in [U][N],
  input  logic  uw_in,
  input  smp_t  noise_lvl [N],
  input  smp_t  fir_coef [TAPS],
  output cplx_t elem_out [N],
  output logic  uw_out
);
  cplx_t noise [N];
  cplx_t sum_r [N];
  logic  uw_d;

  awgn_gen #(.N(N)) u_noise (.clk, .rst, .ce, .noise);

  always_ff @(posedge clk) begin
    if (rst) begin
      uw_d   <= 1'b0;
      uw_out <= 1'b0;
      for (int n = 0; n < N; n++) sum_r[n] <= '0;
    end else if (ce) begin
      uw_d   <= uw_in;
      uw_out <= uw_d;
      for (int n = 0; n < N; n++) begin
        cplx_t s;
        s = cscale(noise[n], noise_lvl[n]);
        for (int u = 0; u < U; u++) s = cadd(s, user_in[u][n]);
        sum_r[n] <= s;
      end
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_flt
    rx_filter #(.TAPS(TAPS)) u_flt (.clk, .rst, .ce, .din(sum_r[n]), .coef(fir_coef), .dout(elem_out[n]));
  end
endmodule
