// awgn_gen: N independent complex white Gaussian noise samples per clock.
//
// For each element, two uniform random numbers u1, u2 in (0,1) come from a
// 32-bit xorshift generator (per-element seed). Box-Muller turns them into
// one complex Gaussian sample
//   n = sqrt(-2 ln u1) * (cos 2*pi*u2 + j sin 2*pi*u2),
// whose I and Q parts each have unit variance. sqrt(-2 ln u1) is read from
// a 1024-entry table addressed by the top 10 bits of u1 (cell centres, so
// u1 = 0 never occurs); the cosine/sine from the common sine table by u2.
// Table sizes and the generator type are this design's choice.
//
// Timing: a new sample on every clock with ce=1; `noise` is registered.
module awgn_gen
  import chsim_pkg::*;
#(
  parameter int unsigned N = N_ELEM
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  output cplx_t noise [N]
);
  typedef smp_t rad_tab_t [1024];
  function automatic rad_tab_t make_rad();
    rad_tab_t t;
    for (int i = 0; i < 1024; i++)
      t[i] = smp_t'($rtoi($sqrt(-2.0 * $ln((i + 0.5) / 1024.0)) * (2.0 ** FRAC)));
    return t;
  endfunction
  localparam rad_tab_t RAD = make_rad();

  function automatic logic [31:0] xs(input logic [31:0] s);
    logic [31:0] x;
    x = s ^ (s << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_el
    logic [31:0] s1, s2;
    smp_t        c, s, r;
    assign r = RAD[s1[31:22]];
    sincos_rom #(.PW(16)) u_rom (.phase(s2[31:16]), .cos_o(c), .sin_o(s));
    always_ff @(posedge clk) begin
      if (rst) begin
        s1       <= 32'h9E3779B9 ^ 32'(n * 7919 + 1);
        s2       <= 32'h7F4A7C15 ^ 32'(n * 104729 + 3);
        noise[n] <= '0;
      end else if (ce) begin
        s1          <= xs(s1);
        s2          <= xs(s2);
        noise[n].re <= rmul(r, c);
        noise[n].im <= rmul(r, s);
      end
    end
  end
endmodule
