// jakes_fading_gen: fading complex envelope of one propagation path.
//
// Implements the Jakes sum-of-sinusoids model
//   z(t) = 1/sqrt(M) * sum_{m=1..M} exp{j(2*pi*f_m*t + psi_m)},
//   f_m = f_D*cos(Theta_m),  Theta_m = Theta_0 + 2*pi*(m-1)/M,  c_m = 1.
// The 1/sqrt(M) scaling makes <|z|^2> = 1.
// On `init` the generator walks the M component waves, one per clock:
// it forms Theta_m, multiplies the Doppler phase increment `fd_inc`
// (f_D/f_s * 2^32) by cos(Theta_m), and draws psi_m from a 32-bit LFSR
// seeded by `seed` (uniform over a full turn). While running, one
// component is advanced and accumulated per sample (ce); after M_MAX
// samples the sum is scaled and presented on `z`. The envelope is thus
// refreshed every M_MAX samples (1.5 MHz at 24 Msamples/s, far above the
// 2 kHz maximum Doppler frequency); each phase advances by M_MAX increments
// per visit. The time-multiplexing and table sizes are this design's choice.
//
// Timing: `busy` is high during the M_MAX-clock initialisation; `z` holds
// until the next refresh, which is marked by a one-clock `upd` pulse.
module jakes_fading_gen
  import chsim_pkg::*;
#(
  parameter int unsigned MMAX = M_MAX
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        init,
  input  logic [31:0] fd_inc,
  input  logic [4:0]  m_num,     // 1..MMAX component waves
  input  logic [15:0] theta0,    // Theta_0, fraction of a turn
  input  logic [31:0] seed,
  output cplx_t       z,
  output logic        upd,
  output logic        busy
);
  localparam int unsigned IW = $clog2(MMAX);

  typedef logic [15:0] step_tab_t [MMAX+1];
  typedef smp_t        norm_tab_t [MMAX+1];
  function automatic step_tab_t make_step();
    step_tab_t t;
    t[0] = '0;
    for (int m = 1; m <= MMAX; m++) t[m] = 16'(65536 / m);
    return t;
  endfunction
  function automatic norm_tab_t make_norm();
    norm_tab_t t;
    t[0] = '0;
    for (int m = 1; m <= MMAX; m++) t[m] = smp_t'($rtoi((2.0 ** FRAC) / $sqrt(1.0 * m)));
    return t;
  endfunction
  localparam step_tab_t STEP = make_step();
  localparam norm_tab_t NORM = make_norm();

  logic [31:0]        ph  [MMAX];
  logic signed [31:0] inc [MMAX];
  logic [IW-1:0]      idx;
  logic [31:0]        lfsr;
  logic [4:0]         m_eff;
  logic [15:0]        theta;
  logic signed [63:0] acc_re, acc_im;
  logic [15:0]        rom_ph;
  smp_t               rc, rs;

  assign m_eff = (m_num == 0) ? 5'd1 : (m_num > 5'(MMAX)) ? 5'(MMAX) : m_num;
  assign rom_ph = busy ? theta : ph[idx][31:16];

  sincos_rom #(.PW(16)) u_rom (.phase(rom_ph), .cos_o(rc), .sin_o(rs));

  always_ff @(posedge clk) begin
    upd <= 1'b0;
    if (rst) begin
      busy   <= 1'b0;
      idx    <= '0;
      lfsr   <= 32'h1;
      theta  <= '0;
      acc_re <= '0;
      acc_im <= '0;
      z      <= '0;
      for (int m = 0; m < MMAX; m++) begin
        ph[m]  <= '0;
        inc[m] <= '0;
      end
    end else if (init) begin
      busy   <= 1'b1;
      idx    <= '0;
      lfsr   <= (seed == 0) ? 32'h1 : seed;
      theta  <= theta0;
      acc_re <= '0;
      acc_im <= '0;
    end else if (busy) begin
      // f_m phase increment = fd_inc * cos(Theta_m); psi_m from the LFSR
      inc[idx] <= 32'((64'($signed({1'b0, fd_inc})) * 64'(rc)) >>> FRAC);
      ph[idx]  <= lfsr;
      lfsr     <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      theta    <= theta + STEP[m_eff];
      idx      <= idx + 1'b1;
      if (idx == IW'(MMAX - 1)) busy <= 1'b0;
    end else if (ce) begin
      if (5'(idx) < m_eff) begin
        acc_re <= acc_re + 64'(rc);
        acc_im <= acc_im + 64'(rs);
      end
      ph[idx] <= ph[idx] + 32'(inc[idx] * $signed(MMAX));
      idx     <= idx + 1'b1;
      if (idx == IW'(MMAX - 1)) begin
        z.re   <= sat(((5'(idx) < m_eff ? acc_re + 64'(rc) : acc_re) * 64'(NORM[m_eff])) >>> FRAC);
        z.im   <= sat(((5'(idx) < m_eff ? acc_im + 64'(rs) : acc_im) * 64'(NORM[m_eff])) >>> FRAC);
        acc_re <= '0;
        acc_im <= '0;
        upd    <= 1'b1;
      end
    end
  end
endmodule
