// array_response_sim: array response simulator for the K paths of one user.
//
// Each path component is received by an N-element array. Simulating the
// array response a(theta_k) is a complex multiplication of the path signal
// by one coefficient per element; the unit outputs, for every element n,
// the sum over its paths of coef[k][n] * path[k]. The coefficients come from
// the system controller, which derives them from the DOA and array geometry.
//
// Timing: one sample per clock where ce=1; elem_out and uw_out are
// registered (one ce of latency).
module array_response_sim
  import chsim_pkg::*;
#(
  parameter int unsigned K = K_DES,
  parameter int unsigned N = N_ELEM
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  cplx_t path_in [K],
  input  logic  uw_in,
  input  cplx_t coef    [K][N],
  output cplx_t elem_out [N],
  output logic  uw_out
);
  cplx_t sum [N];

  always_comb begin
    for (int n = 0; n < N; n++) begin
      sum[n] = '0;
      for (int k = 0; k < K; k++) sum[n] = cadd(sum[n], cmul(path_in[k], coef[k][n]));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      uw_out <= 1'b0;
      for (int n = 0; n < N; n++) elem_out[n] <= '0;
    end else if (ce) begin
      uw_out <= uw_in;
      for (int n = 0; n < N; n++) elem_out[n] <= sum[n];
    end
  end
endmodule
