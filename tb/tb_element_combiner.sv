// tb_element_combiner: without noise, each element output is the sum of
// the users' element signals through the filter (two-ce latency, checked
// with a two-tap filter computed here); with noise level 0.5 on one
// element, the residual has variance 0.25 per rail and the others stay
// exact. UW timing follows with the same latency.
module tb_element_combiner;
  import chsim_pkg::*;
  localparam int U = 2, N = 4, T = 8;
  logic clk = 0, rst = 1, ce = 0, uw_in = 0, uw_out;
  cplx_t user_in [U][N];
  smp_t noise_lvl [N];
  smp_t fir_coef [T];
  cplx_t elem_out [N];
  int checks = 0, failures = 0;
  cplx_t sums [$][N];
  logic uws [$];
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  element_combiner #(.U(U), .N(N), .TAPS(T)) dut (.clk, .rst, .ce, .user_in, .uw_in, .noise_lvl, .fir_coef, .elem_out, .uw_out);
  always #5 clk = ~clk;

  initial begin
    real var_acc;
    int nv;
    var_acc = 0; nv = 0;
    for (int t = 0; t < T; t++) fir_coef[t] = '0;
    fir_coef[0] = smp_t'(ONE / 2);
    fir_coef[1] = smp_t'(ONE / 4);
    for (int n = 0; n < N; n++) noise_lvl[n] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      cplx_t s [N];
      @(negedge clk);
      if (i == 1000) noise_lvl[2] = smp_t'(ONE / 2);
      for (int n = 0; n < N; n++) begin
        s[n] = '0;
        for (int u = 0; u < U; u++) begin
          user_in[u][n] = '{re: smp_t'($signed($urandom) >>> 10), im: smp_t'($signed($urandom) >>> 10)};
          s[n].re += user_in[u][n].re;
          s[n].im += user_in[u][n].im;
        end
      end
      uw_in = (i % 9 == 0);
      sums.push_front(s);
      uws.push_front(uw_in);
      ce = 1;
      @(negedge clk) ce = 0;
      if (i >= 3) begin
        checks++;
        if (uw_out != uws[1]) failures++;
        for (int n = 0; n < N; n++) begin
          real er, ei;
          er = real'(sums[1][n].re) / 2.0 + real'(sums[2][n].re) / 4.0;
          ei = real'(sums[1][n].im) / 2.0 + real'(sums[2][n].im) / 4.0;
          if (n == 2 && i >= 1000) begin
            real d;
            d = (real'(elem_out[n].re) - er) / 2.0**FRAC;
            if (i > 1005) begin var_acc += d*d; nv++; end
          end else begin
            checks++;
            if (fabs(real'(elem_out[n].re) - er) > 3 || fabs(real'(elem_out[n].im) - ei) > 3) begin
              failures++; $display("FAIL i=%0d n=%0d", i, n);
            end
          end
        end
      end
    end
    // filtered noise: 0.25 * (0.5^2 + 0.25^2) per rail
    var_acc /= nv;
    $display("noise variance %f (expected %f)", var_acc, 0.25 * 0.3125);
    checks++;
    if (var_acc < 0.9 * 0.078125 || var_acc > 1.1 * 0.078125) failures++;
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
