// tb_array_response_sim: random paths and coefficients; every element
// output must equal sum_k coef[k][n]*path[k], computed here in real
// arithmetic (tolerance of a few LSBs for rounding), one ce later.
module tb_array_response_sim;
  import chsim_pkg::*;
  localparam int K = 3, N = 8;
  logic clk = 0, rst = 1, ce = 0, uw_in = 0, uw_out;
  cplx_t path_in [K];
  cplx_t coef [K][N];
  cplx_t elem_out [N];
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  int checks = 0, failures = 0;

  array_response_sim #(.K(K), .N(N)) dut (.clk, .rst, .ce, .path_in, .uw_in, .coef, .elem_out, .uw_out);
  always #5 clk = ~clk;

  function automatic smp_t rnd();
    return smp_t'($signed($urandom) >>> 11);   // about +-1
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      real er [N], ei [N];
      @(negedge clk);
      for (int k = 0; k < K; k++) begin
        path_in[k] = '{re: rnd(), im: rnd()};
        for (int n = 0; n < N; n++) coef[k][n] = '{re: rnd(), im: rnd()};
      end
      uw_in = t[0];
      for (int n = 0; n < N; n++) begin
        er[n] = 0; ei[n] = 0;
        for (int k = 0; k < K; k++) begin
          real a, b, c, d;
          a = real'(path_in[k].re); b = real'(path_in[k].im);
          c = real'(coef[k][n].re); d = real'(coef[k][n].im);
          er[n] += (a*c - b*d) / 2.0**FRAC;
          ei[n] += (a*d + b*c) / 2.0**FRAC;
        end
      end
      ce = 1;
      @(negedge clk) ce = 0;
      checks++;
      if (uw_out != uw_in) failures++;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (fabs(real'(elem_out[n].re) - er[n]) > 4 || fabs(real'(elem_out[n].im) - ei[n]) > 4) begin
          failures++;
          $display("FAIL t=%0d n=%0d got %0d %0d exp %f %f", t, n, elem_out[n].re, elem_out[n].im, er[n], ei[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
