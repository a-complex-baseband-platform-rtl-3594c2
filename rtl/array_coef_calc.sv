// array_coef_calc: the controller's phase-rotation calculation.
//
// For each of the NP path components and each of the N elements it computes
// the array-response coefficient a_n(theta) = exp(j*phi_n) for an array with
// half-wavelength minimum element spacing:
//   linear   : phi_n = pi * n * sin(theta)
//   circular : phi_n = -(pi/(2 sin(pi/Ne))) * cos(theta - 2*pi*n/Ne)
// where Ne (1..N) is the number of active elements; elements n >= Ne get 0.
// Angles are 16-bit fractions of a turn. Phases are computed in turns
// (16-bit), then cosine and sine come from the sine table. One coefficient
// is produced per clock, paths outer, elements inner, so a full update takes
// NP*N clocks.
//
// Interface: `start` begins a pass (ignored while busy); each result is
// offered as wr_en/wr_path/wr_elem/wr_coef for one clock; `busy` is high
// for the whole pass.
module array_coef_calc
  import chsim_pkg::*;
#(
  parameter int unsigned NP = K0,
  parameter int unsigned N  = N_ELEM
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        circular,
  input  logic [3:0]  n_elem,
  input  logic [15:0] doa [NP],
  output logic        busy,
  output logic        wr_en,
  output logic [$clog2(NP+1)-1:0] wr_path,
  output logic [$clog2(N+1)-1:0]  wr_elem,
  output cplx_t       wr_coef
);
  // per element count: 2*pi/Ne as a 16-bit angle, and 1/(4 sin(pi/Ne)) turns (Q16)
  typedef logic [15:0] tab_t [N+1];
  typedef logic [31:0] ktab_t [N+1];
  function automatic tab_t make_step();
    tab_t t;
    t[0] = '0;
    for (int m = 1; m <= N; m++) t[m] = 16'(65536 / m);
    return t;
  endfunction
  function automatic ktab_t make_k();
    ktab_t t;
    t[0] = '0;
    t[1] = '0;
    for (int m = 2; m <= N; m++) t[m] = 32'($rtoi(65536.0 / (4.0 * $sin(3.141592653589793 / m)) + 0.5));
    return t;
  endfunction
  localparam tab_t  STEP = make_step();
  localparam ktab_t KC   = make_k();

  logic [$clog2(NP+1)-1:0] p;
  logic [$clog2(N+1)-1:0]  n;
  logic [3:0]              ne;
  logic [15:0]             ang, turns;
  smp_t                    c1, s1, c2, s2;
  logic signed [63:0]      prod;

  assign ne  = (n_elem == 0) ? 4'd1 : (n_elem > 4'(N)) ? 4'(N) : n_elem;
  // geometry angle: theta (linear) or theta - 2*pi*n/Ne (circular)
  assign ang = circular ? doa[p] - 16'(32'(n) * 32'(STEP[ne])) : doa[p];
  sincos_rom #(.PW(16)) u_rom1 (.phase(ang), .cos_o(c1), .sin_o(s1));
  always_comb begin
    if (circular) begin
      prod  = 64'(c1) * $signed({32'd0, KC[ne]});
      turns = 16'(-(prod >>> FRAC));
    end else begin
      // n * sin(theta) / 2 turns, sin in Q20 -> Q16 turns: >> (FRAC+1-16)
      prod  = 64'(s1) * 64'(n);
      turns = 16'(prod >>> (FRAC - 15));
    end
  end
  sincos_rom #(.PW(16)) u_rom2 (.phase(turns), .cos_o(c2), .sin_o(s2));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      wr_en   <= 1'b0;
      p       <= '0;
      n       <= '0;
      wr_path <= '0;
      wr_elem <= '0;
      wr_coef <= '0;
    end else begin
      wr_en <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          p    <= '0;
          n    <= '0;
        end
      end else begin
        wr_en   <= 1'b1;
        wr_path <= p;
        wr_elem <= n;
        wr_coef <= (4'(n) < ne) ? '{re: c2, im: s2} : '0;
        if (n == ($bits(n))'(N - 1)) begin
          n <= '0;
          if (p == ($bits(p))'(NP - 1)) busy <= 1'b0;
          else p <= p + 1'b1;
        end else n <= n + 1'b1;
      end
    end
  end
endmodule
