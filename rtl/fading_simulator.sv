// fading_simulator: K-path fading simulator of one user.
//
// The transmitted signal of one user is split into K path components. Path
// k is the input delayed by delay[k] samples (0..DELAY_MAX-1, one sample =
// 1/24 MHz = 41.7 ns, up to 5.2 us), multiplied by its own Jakes fading
// envelope z_k and by the real attenuation atten[k]. All K paths share the
// user's maximum Doppler frequency (fd_inc); each has its own number of
// component waves, Theta_0 and phase seed. With fade_en=0 the envelope is
// replaced by 1 (no fading). The delay line is one circular buffer of
// DEPTH samples read at K offsets.
//
// Timing: one sample per clock where ce=1. Outputs are registered: a
// sample entering with delay 0 appears on path_out one ce later; `uw_out`
// carries the input UW timing with the same one-sample latency (undelayed).
// `init` (re)starts all fading generators; their `busy` lasts MMAX clocks.
module fading_simulator
  import chsim_pkg::*;
#(
  parameter int unsigned K     = K_DES,
  parameter int unsigned DEPTH = 128
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  cplx_t       din,
  input  logic        uw_in,
  input  logic        init,
  input  logic        fade_en,
  input  logic [31:0] fd_inc,
  input  logic [6:0]  delay   [K],
  input  smp_t        atten   [K],
  input  logic [4:0]  m_num   [K],
  input  logic [15:0] theta0  [K],
  input  logic [31:0] seed    [K],
  output cplx_t       path_out [K],
  output logic        uw_out
);
  localparam int unsigned AW = $clog2(DEPTH);

  cplx_t         mem [DEPTH];
  logic [AW-1:0] wp;
  cplx_t         z   [K];
  cplx_t         dly [K];

  for (genvar k = 0; k < K; k++) begin : g_path
    logic upd_unused, busy_unused;
    jakes_fading_gen u_fade (
      .clk, .rst, .ce, .init, .fd_inc,
      .m_num(m_num[k]), .theta0(theta0[k]), .seed(seed[k]),
      .z(z[k]), .upd(upd_unused), .busy(busy_unused));
    // delay 0 bypasses the memory; delay d reads the sample written d ce ago
    assign dly[k] = (delay[k] == 0) ? din : mem[wp - AW'(delay[k])];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp     <= '0;
      uw_out <= 1'b0;
      for (int k = 0; k < K; k++) path_out[k] <= '0;
    end else if (ce) begin
      mem[wp] <= din;
      wp      <= wp + 1'b1;
      uw_out  <= uw_in;
      for (int k = 0; k < K; k++)
        path_out[k] <= cscale(fade_en ? cmul(dly[k], z[k]) : dly[k], atten[k]);
    end
  end
endmodule
