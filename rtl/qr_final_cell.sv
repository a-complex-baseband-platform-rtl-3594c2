// qr_final_cell: final cell of the QR-RLS systolic array.
//
// Multiplies the residual alpha that leaves the reference row by gamma, the
// product of the cosines of all boundary-cell rotations for the same input
// vector. The product is the a-posteriori estimation error
// e = y - w^T x of the current least-squares solution, obtained without
// computing w (the standard final cell of the QR-RLS array).
//
// Timing: registered, updated on `step` when alpha is valid.
module qr_final_cell
  import chsim_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   step,
  input  ecplx_t alpha,
  input  logic   alpha_valid,
  input  ew_t    gamma_in,
  output ecplx_t e,
  output logic   e_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      e       <= '0;
      e_valid <= 1'b0;
    end else if (step) begin
      e_valid <= alpha_valid;
      if (alpha_valid) begin
        e.re <= emul(gamma_in, alpha.re);
        e.im <= emul(gamma_in, alpha.im);
      end
    end
  end
endmodule
