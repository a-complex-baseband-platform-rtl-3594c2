// tb_qr_cells: one boundary, one internal and one final cell wired as the
// smallest array column (boundary rotation drives the internal cell, whose
// output and the boundary's gamma drive the final cell). Random complex
// inputs are applied for many updates; r, c, s, x_out and e are compared
// with a floating-point Givens-rotation model computed here. Also checks
// that the boundary cell finishes within its 67-clock budget, that the
// rotation zeroes the input (c*x - s*beta*r = 0 for the boundary's own
// input) and that clr empties the cells.
module tb_qr_cells;
  import chsim_pkg::*;
  localparam int SLOT = 72;
  logic clk = 0, rst = 1, clr = 0, step = 0;
  ew_t beta;
  ecplx_t xb, xi;
  logic vb = 0, vi = 0;
  ew_t c, gout, rb;
  ecplx_t s, xo, so, ri, e;
  logic csv, xov, csov, busy, ev;
  ew_t co;
  int checks = 0, failures = 0;
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real f(input ew_t v);
    return real'(v) / 2.0**EFRAC;
  endfunction
  function automatic ew_t q(input real v);
    return ew_t'($rtoi(v * 2.0**EFRAC));
  endfunction

  qr_boundary_cell u_b (.clk, .rst, .clr, .step, .beta, .x_in(xb), .x_valid(vb), .gamma_in(EONE),
    .c_out(c), .s_out(s), .cs_valid(csv), .gamma_out(gout), .r(rb), .busy);
  qr_internal_cell u_i (.clk, .rst, .clr, .step, .beta, .x_in(xi), .x_valid(vi),
    .c_in(c), .s_in(s), .cs_valid_in(csv), .x_out(xo), .x_valid_out(xov),
    .c_out(co), .s_out(so), .cs_valid_out(csov), .r(ri));
  qr_final_cell u_f (.clk, .rst, .step, .alpha(xo), .alpha_valid(xov), .gamma_in(gout), .e, .e_valid(ev));
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic pulse();
    @(negedge clk) step = 1;
    @(negedge clk) step = 0;
  endtask

  initial begin
    real br, r_m, xr, xim, c_m, sr_m, si_m, rir, rii, bx, rn, xor_m, xoi_m, bir, bii, g_m;
    real yr, yi;
    int n;
    beta = q(0.9486833);   // sqrt(0.9)
    r_m = 0; rir = 0; rii = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      // new inputs: boundary x and internal x of the same vector
      xr = ($urandom % 2000) / 1000.0 - 1.0; xim = ($urandom % 2000) / 1000.0 - 1.0;
      yr = ($urandom % 2000) / 1000.0 - 1.0; yi = ($urandom % 2000) / 1000.0 - 1.0;
      xb = '{re: q(xr), im: q(xim)};
      vb = 1; vi = 0;
      pulse();
      n = 0;
      while (busy) begin @(negedge clk); n++; end
      chk(n <= SLOT - 3, $sformatf("boundary computation %0d clocks", n));
      // model
      bx = 0.9486833 * r_m;
      rn = $sqrt(bx*bx + xr*xr + xim*xim);
      c_m = (rn == 0) ? 1.0 : bx / rn;
      sr_m = (rn == 0) ? 0.0 : xr / rn;
      si_m = (rn == 0) ? 0.0 : xim / rn;
      r_m = rn;
      chk(fabs(f(rb) - r_m) < 1e-4 * (1 + r_m), $sformatf("boundary r %f vs %f", f(rb), r_m));
      chk(fabs(f(c) - c_m) < 1e-5 && fabs(f(s.re) - sr_m) < 1e-5 && fabs(f(s.im) - si_m) < 1e-5, "rotation");
      chk(fabs(f(c) * xr - (f(s.re) * bx)) < 1e-4, "rotation zeroes input");
      chk(fabs(f(gout) - c_m) < 1e-5, "gamma");
      // the internal cell's input arrives one slot later, with the rotation
      xi = '{re: q(yr), im: q(yi)};
      vb = 0; vi = 1;
      pulse();
      bir = 0.9486833 * rir; bii = 0.9486833 * rii;
      xor_m = c_m * yr - (sr_m * bir - si_m * bii);
      xoi_m = c_m * yi - (sr_m * bii + si_m * bir);
      rir = sr_m * yr + si_m * yi + c_m * bir;
      rii = sr_m * yi - si_m * yr + c_m * bii;
      chk(fabs(f(ri.re) - rir) < 1e-4 * (1 + fabs(rir)) && fabs(f(ri.im) - rii) < 1e-4 * (1 + fabs(rii)), "internal r");
      chk(fabs(f(xo.re) - xor_m) < 1e-4 && fabs(f(xo.im) - xoi_m) < 1e-4, "internal x_out");
      chk(xov && csov && co == c && so == s, "internal passes rotation");
      vi = 0;
      g_m = c_m;
      pulse();
      chk(ev && fabs(f(e.re) - g_m * xor_m) < 1e-4 && fabs(f(e.im) - g_m * xoi_m) < 1e-4, "final e");
    end
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    chk(rb == 0 && ri == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
