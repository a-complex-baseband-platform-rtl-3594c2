// tb_param_estimator: the estimator board end to end at reduced size.
// The host writes lambda, the unique-word length, the row sources (three
// antenna rows and one row of the unique word delayed by one symbol) and
// the unique word itself. The element streams are random symbols held for
// SPS samples, and the unique word is built here to satisfy
//   uw[s] = sum_n x_n[s] w_n + w_3 uw[s-1]
// exactly. After a trigger the board must capture, run, signal done, give
// near-zero a-posteriori errors after the first P symbols, and its cell
// contents must solve (by back-substitution here) to w. A second trigger
// while busy must be ignored; beta must be sqrt(lambda).
module tb_param_estimator;
  import chsim_pkg::*;
  localparam int P = 4, N = 3, UW_MAX = 32, SPS = 2, SLOT = 72, UL = 24;
  logic clk = 0, rst = 1, ce = 0, uw_in = 0, wr_en = 0, trigger = 0;
  cplx_t elem_in [N];
  logic [11:0] wr_addr;
  logic [31:0] wr_data;
  logic done, active, e_valid;
  ecplx_t e, rd_data;
  logic [$clog2(P+1)-1:0] rd_row = 0, rd_col = 0;
  int checks = 0, failures = 0;
  real wr [P], wi [P];
  cplx_t xs [UL][N];
  real ur [UL], ui [UL];
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real f(input ew_t v);
    return real'(v) / 2.0**EFRAC;
  endfunction

  param_estimator #(.P(P), .N(N), .UW_MAX(UW_MAX), .SPS(SPS), .SLOT(SLOT)) dut (.clk, .rst, .ce, .elem_in, .uw_in,
    .wr_en, .wr_addr, .wr_data, .trigger, .done, .active, .e, .e_valid, .rd_row, .rd_col, .rd_data);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic hw(input int a, input logic [31:0] d);
    @(negedge clk) wr_en = 1; wr_addr = 12'(a); wr_data = d;
    @(negedge clk) wr_en = 0;
  endtask

  int ne = 0, dones = 0;
  real emax = 0;
  always @(posedge clk) if (!rst) begin
    if (done) dones++;
    if (e_valid && dut.step) begin
      if (ne >= P + 1) emax = (fabs(f(e.re)) + fabs(f(e.im)) > emax) ? fabs(f(e.re)) + fabs(f(e.im)) : emax;
      ne++;
    end
  end

  initial begin
    real rr [P][P], ri [P][P], u_r [P], u_i [P], sr, si, w_r [P], w_i [P];
    int t;
    wr[0] = 0.3; wi[0] = -0.2; wr[1] = -0.25; wi[1] = 0.1; wr[2] = 0.15; wi[2] = 0.35; wr[3] = 0.4; wi[3] = -0.1;
    for (int s = 0; s < UL; s++) begin
      real ar, ai;
      ar = 0; ai = 0;
      for (int n = 0; n < N; n++) begin
        real a, b;
        xs[s][n] = '{re: ($urandom % 2) ? smp_t'(ONE / 2) : -smp_t'(ONE / 2), im: ($urandom % 2) ? smp_t'(ONE / 2) : -smp_t'(ONE / 2)};
        a = real'(xs[s][n].re) / 2.0**FRAC; b = real'(xs[s][n].im) / 2.0**FRAC;
        ar += a * wr[n] - b * wi[n];
        ai += a * wi[n] + b * wr[n];
      end
      if (s > 0) begin
        ar += ur[s-1] * wr[3] - ui[s-1] * wi[3];
        ai += ur[s-1] * wi[3] + ui[s-1] * wr[3];
      end
      ur[s] = real'($rtoi(ar * 2.0**FRAC)) / 2.0**FRAC;
      ui[s] = real'($rtoi(ai * 2.0**FRAC)) / 2.0**FRAC;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    hw(0, 32'd16609444);   // lambda = 0.99
    hw(1, UL);
    hw('h100, 32'h0000_0001); hw('h101, 32'h0000_0101); hw('h102, 32'h0000_0201); hw('h103, 32'h0000_0102);
    for (int s = 0; s < UL; s++) begin
      hw('h200 + s, 32'($rtoi(ur[s] * 2.0**FRAC)));
      hw('h300 + s, 32'($rtoi(ui[s] * 2.0**FRAC)));
    end
    chk(fabs(f(dut.beta) - $sqrt(0.99)) < 1e-6, "beta = sqrt(lambda)");
    @(negedge clk) trigger = 1;
    @(negedge clk) trigger = 0;
    // element stream: symbol s at samples 10+s*SPS .. ; UW mark at sample 10
    t = 0;
    for (int i = 0; i < 10 + UL * SPS + 5; i++) begin
      int s;
      s = (i - 10) / SPS;
      for (int n = 0; n < N; n++) elem_in[n] = (i >= 10 && s < UL) ? xs[s][n] : '{re: smp_t'(12345), im: '0};
      uw_in = (i == 10);
      ce = 1;
      @(negedge clk) ce = 0;
      @(negedge clk);
      if (i == 30) begin
        trigger = 1;    // ignored: estimation in progress
        @(negedge clk) trigger = 0;
      end
    end
    while (dones == 0 && t < 200000) begin @(negedge clk); t++; end
    chk(dones == 1, "done");
    repeat (SLOT * 4) @(negedge clk);
    chk(!active && dones == 1, "one estimation only");
    chk(ne == UL, $sformatf("%0d errors", ne));
    chk(emax < 1e-3, $sformatf("a-posteriori error %g", emax));
    for (int j = 0; j < P; j++) begin
      for (int i = j; i < P; i++) begin
        @(negedge clk) rd_row = ($bits(rd_row))'(i); rd_col = ($bits(rd_col))'(j);
        #1; rr[j][i] = f(rd_data.re); ri[j][i] = f(rd_data.im);
      end
      @(negedge clk) rd_row = ($bits(rd_row))'(P); rd_col = ($bits(rd_col))'(j);
      #1; u_r[j] = f(rd_data.re); u_i[j] = f(rd_data.im);
    end
    for (int j = P - 1; j >= 0; j--) begin
      sr = u_r[j]; si = u_i[j];
      for (int i = j + 1; i < P; i++) begin
        sr -= rr[j][i] * w_r[i] - ri[j][i] * w_i[i];
        si -= rr[j][i] * w_i[i] + ri[j][i] * w_r[i];
      end
      w_r[j] = sr / rr[j][j]; w_i[j] = si / rr[j][j];
      chk(fabs(w_r[j] - wr[j]) < 2e-3 && fabs(w_i[j] - wi[j]) < 2e-3,
          $sformatf("w[%0d] = %f, %f expected %f, %f", j, w_r[j], w_i[j], wr[j], wi[j]));
    end
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
