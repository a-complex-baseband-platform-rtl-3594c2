// qr_internal_cell: internal cell of the QR-RLS systolic array.
//
// Holds one complex element r of the triangular factor (or, in the
// reference row, of the transformed desired-response vector). It applies
// the rotation (c, s) received from the boundary cell of its column to the
// pair (beta*r, x):
//   x_out = c*x - s*(beta*r),   r <- conj(s)*x + c*(beta*r)
// and passes x_out on along its row and (c, s) on down its column. The
// rotation matches qr_boundary_cell; arithmetic is 32-bit with 24
// fractional bits (this design's choice).
//
// Timing: single-clock update on `step`, when the data and rotation inputs
// are valid (they arrive together in a correctly skewed array). Outputs are
// registered; with invalid inputs the output valid flags drop. `clr`
// empties the cell.
module qr_internal_cell
  import chsim_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   clr,
  input  logic   step,
  input  ew_t    beta,
  input  ecplx_t x_in,
  input  logic   x_valid,
  input  ew_t    c_in,
  input  ecplx_t s_in,
  input  logic   cs_valid_in,
  output ecplx_t x_out,
  output logic   x_valid_out,
  output ew_t    c_out,
  output ecplx_t s_out,
  output logic   cs_valid_out,
  output ecplx_t r
);
  ecplx_t br, xo, rn;

  always_comb begin
    br.re = emul(beta, r.re);
    br.im = emul(beta, r.im);
    // x_out = c*x - s*br
    xo.re = emul(c_in, x_in.re) - (emul(s_in.re, br.re) - emul(s_in.im, br.im));
    xo.im = emul(c_in, x_in.im) - (emul(s_in.re, br.im) + emul(s_in.im, br.re));
    // r' = conj(s)*x + c*br
    rn.re = emul(s_in.re, x_in.re) + emul(s_in.im, x_in.im) + emul(c_in, br.re);
    rn.im = emul(s_in.re, x_in.im) - emul(s_in.im, x_in.re) + emul(c_in, br.im);
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      r            <= '0;
      x_out        <= '0;
      x_valid_out  <= 1'b0;
      c_out        <= EONE;
      s_out        <= '0;
      cs_valid_out <= 1'b0;
    end else if (step) begin
      x_valid_out  <= x_valid && cs_valid_in;
      cs_valid_out <= x_valid && cs_valid_in;
      if (x_valid && cs_valid_in) begin
        r     <= rn;
        x_out <= xo;
        c_out <= c_in;
        s_out <= s_in;
      end
    end
  end

  // data and rotation must travel together through a skewed array
  a_aligned: assert property (@(posedge clk) disable iff (rst || clr) step |-> (x_valid == cs_valid_in));
endmodule
