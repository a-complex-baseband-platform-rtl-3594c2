// tb_awgn_gen: statistics of the Box-Muller noise: per-rail mean near 0,
// variance near 1, a Gaussian fourth moment (E[x^4] = 3), near-zero
// correlation between I and Q and between two elements, and a new value
// on every ce only.
module tb_awgn_gen;
  import chsim_pkg::*;
  localparam int N = 4, S = 40000;
  logic clk = 0, rst = 1, ce = 0;
  cplx_t noise [N];
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  int checks = 0, failures = 0;

  awgn_gen #(.N(N)) dut (.clk, .rst, .ce, .noise);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    real m [N], v [N], q [N], ciq [N], c01;
    cplx_t held;
    for (int n = 0; n < N; n++) begin m[n] = 0; v[n] = 0; q[n] = 0; ciq[n] = 0; end
    c01 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < S; s++) begin
      @(negedge clk) ce = 1;
      @(negedge clk) ce = 0;
      for (int n = 0; n < N; n++) begin
        real a, b;
        a = real'(noise[n].re) / 2.0**FRAC;
        b = real'(noise[n].im) / 2.0**FRAC;
        m[n] += a; v[n] += a*a + b*b; q[n] += a*a*a*a; ciq[n] += a*b;
      end
      c01 += real'(noise[0].re) * real'(noise[1].re) / 2.0**(2*FRAC);
    end
    for (int n = 0; n < N; n++) begin
      m[n] /= S; v[n] /= (2*S); q[n] /= S; ciq[n] /= S;
      $display("elem %0d: mean %f var %f m4 %f corr_iq %f", n, m[n], v[n], q[n], ciq[n]);
      chk(fabs(m[n]) < 0.03, "mean");
      chk(v[n] > 0.95 && v[n] < 1.05, "variance");
      chk(q[n] > 2.7 && q[n] < 3.3, "fourth moment");
      chk(fabs(ciq[n]) < 0.03, "I/Q correlation");
    end
    chk(fabs(c01 / S) < 0.03, "element correlation");
    held = noise[0];
    repeat (5) @(negedge clk);
    chk(noise[0] == held, "holds without ce");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
