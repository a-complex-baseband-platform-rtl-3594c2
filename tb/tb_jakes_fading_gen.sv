// tb_jakes_fading_gen: checks the Jakes generator.
// 1) M = 1: |z| = 1 and the phase advances by f_D*cos(Theta_0)*16 samples
//    per refresh (computed here in real arithmetic).
// 2) M = 8, Theta_0 off symmetry: time average of |z|^2 is 1 (distinct
//    Doppler frequencies), and the mean of z is near 0.
// 3) f_D = 0: z is constant.
// Also checks the refresh period of M_MAX samples and the init length.
module tb_jakes_fading_gen;
  import chsim_pkg::*;
  logic clk = 0, rst = 1, ce = 0, init = 0;
  logic [31:0] fd_inc = 0, seed = 32'hCAFE_F00D;
  logic [4:0] m_num = 1;
  logic [15:0] theta0 = 0;
  cplx_t z;
  logic upd, busy;
  int checks = 0, failures = 0;

  jakes_fading_gen dut (.clk, .rst, .ce, .init, .fd_inc, .m_num, .theta0, .seed, .z, .upd, .busy);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic real mag2(input cplx_t v);
    real a, b;
    a = real'(v.re) / 2.0**FRAC;
    b = real'(v.im) / 2.0**FRAC;
    return a*a + b*b;
  endfunction

  task automatic do_init();
    int n;
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    n = 0;
    while (busy) begin @(negedge clk); n++; end
    chk(n == M_MAX - 1 || n == M_MAX, $sformatf("init length %0d", n));
  endtask

  initial begin
    real p, sr, si, ph0, ph1, dph, expd;
    int nupd, last, cyc;
    repeat (3) @(posedge clk);
    rst = 0;
    // ---- 1) single wave
    fd_inc = 32'd2147484;          // 1/2000 turn per sample
    m_num = 1; theta0 = 16'h1000;  // cos(22.5 deg)
    do_init();
    ce = 1;
    nupd = 0; last = -1; cyc = 0; ph0 = 0;
    while (nupd < 50) begin
      @(posedge clk); cyc++;
      #1;
      if (upd) begin
        chk(mag2(z) > 0.98 && mag2(z) < 1.02, "M=1 magnitude");
        ph1 = $atan2(real'(z.im), real'(z.re)) / 6.283185307179586;
        if (nupd > 0) begin
          dph = ph1 - ph0;
          if (dph < -0.5) dph += 1.0;
          if (dph > 0.5) dph -= 1.0;
          expd = 16.0 / 2000.0 * $cos(6.283185307179586 / 16.0);
          chk(dph > expd - 0.002 && dph < expd + 0.002, $sformatf("M=1 phase step %f vs %f", dph, expd));
          chk(cyc - last == M_MAX, "refresh period");
        end
        ph0 = ph1; last = cyc; nupd++;
      end
    end
    // ---- 2) eight waves, power and mean
    ce = 0;
    m_num = 8; theta0 = 16'h0400;
    do_init();
    ce = 1;
    p = 0; sr = 0; si = 0; nupd = 0;
    while (nupd < 20000) begin
      @(posedge clk); #1;
      if (upd) begin
        p += mag2(z);
        sr += real'(z.re) / 2.0**FRAC;
        si += real'(z.im) / 2.0**FRAC;
        nupd++;
      end
    end
    p = p / nupd; sr = sr / nupd; si = si / nupd;
    $display("M=8: <|z|^2> = %f, <z> = %f %f", p, sr, si);
    chk(p > 0.93 && p < 1.07, "M=8 mean power");
    chk(sr*sr + si*si < 0.01, "M=8 mean");
    // ---- 3) no Doppler: constant envelope
    ce = 0; fd_inc = 0;
    do_init();
    ce = 1;
    begin
      cplx_t z0;
      int k = 0;
      while (k < 10) begin
        @(posedge clk); #1;
        if (upd) begin
          if (k == 0) z0 = z;
          else chk(z == z0, "f_D = 0 constant");
          k++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
