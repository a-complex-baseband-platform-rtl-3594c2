// tb_systolic_rls_array: least-squares behaviour of the QR-RLS array.
// Input vectors x (P complex) and desired response y = x^T w_true are fed
// with the row skew done here. After the run the cell contents R and u are
// read out and R w = u is solved by back-substitution here: w must match
// w_true, and the a-posteriori error must be near zero once P vectors have
// passed. Run 1 uses all rows; run 2 (after clr) leaves row 2 at zero,
// which must make that row transparent (R_22 = 0) while the others still
// solve. Run 3 adds noise to y: the last error output must then equal the
// a-posteriori error y - x^T w of the last vector, with w solved from the
// final cell contents (this needs the gamma path along the diagonal).
// Also checks the 2P+1-step latency of the error output.
module tb_systolic_rls_array;
  import chsim_pkg::*;
  localparam int P = 5, SLOT = 72, NV = 24;
  logic clk = 0, rst = 1, clr = 0, step = 0;
  ew_t beta;
  ecplx_t x_in [P+1];
  logic x_valid [P+1];
  ecplx_t e, rd_data;
  logic e_valid, busy;
  logic [$clog2(P+1)-1:0] rd_row = 0, rd_col = 0;
  int checks = 0, failures = 0;
  int stepn = 0, first_e = -1;
  real wr [P], wi [P];
  real xr [NV][P], xim [NV][P], yr [NV], yi [NV];
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real f(input ew_t v);
    return real'(v) / 2.0**EFRAC;
  endfunction
  function automatic ew_t q(input real v);
    return ew_t'($rtoi(v * 2.0**EFRAC));
  endfunction

  systolic_rls_array #(.P(P)) dut (.clk, .rst, .clr, .step, .beta, .x_in, .x_valid, .e, .e_valid,
    .rd_row, .rd_col, .rd_data, .busy);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int ecount = 0;
  real emax = 0, elr = 0, eli = 0;
  always @(posedge clk) if (!rst && step) stepn <= stepn + 1;
  always @(negedge clk) if (!rst && e_valid && step === 1'b0 && $past(step)) begin
    if (first_e < 0) first_e = stepn;
    if (ecount >= P + 1) emax = (fabs(f(e.re)) + fabs(f(e.im)) > emax) ? fabs(f(e.re)) + fabs(f(e.im)) : emax;
    elr = f(e.re); eli = f(e.im);
    ecount++;
  end

  task automatic run(input int zero_row, input real noise);
    real rr [P][P], ri [P][P], ur [P], ui [P], sr, si, w_r [P], w_i [P];
    // generate
    for (int p = 0; p < P; p++) begin
      wr[p] = ($urandom % 1000) / 1000.0 - 0.5;
      wi[p] = ($urandom % 1000) / 1000.0 - 0.5;
    end
    for (int v = 0; v < NV; v++) begin
      yr[v] = 0; yi[v] = 0;
      for (int p = 0; p < P; p++) begin
        xr[v][p] = (p == zero_row) ? 0.0 : ($urandom % 2000) / 1000.0 - 1.0;
        xim[v][p] = (p == zero_row) ? 0.0 : ($urandom % 2000) / 1000.0 - 1.0;
        yr[v] += xr[v][p] * wr[p] - xim[v][p] * wi[p];
        yi[v] += xr[v][p] * wi[p] + xim[v][p] * wr[p];
      end
      yr[v] += noise * (($urandom % 2000) / 1000.0 - 1.0);
      yi[v] += noise * (($urandom % 2000) / 1000.0 - 1.0);
    end
    ecount = 0; emax = 0; first_e = -1;
    // feed with skew: row i gets vector v at relative step v + i
    for (int t = 0; t < NV + 2 * P + 3; t++) begin
      @(negedge clk);
      for (int i = 0; i <= P; i++) begin
        int v;
        v = t - i;
        x_valid[i] = (v >= 0 && v < NV);
        if (x_valid[i]) x_in[i] = (i < P) ? '{re: q(xr[v][i]), im: q(xim[v][i])} : '{re: q(yr[v]), im: q(yi[v])};
        else x_in[i] = '0;
      end
      if (t == 0) stepn = 0;
      step = 1;
      @(negedge clk) step = 0;
      repeat (SLOT - 2) @(negedge clk);
    end
    chk(first_e == 2 * P + 1, $sformatf("error latency %0d steps", first_e));
    chk(ecount == NV, $sformatf("%0d error outputs", ecount));
    if (noise == 0.0) chk(emax < 1e-3, $sformatf("a-posteriori error %g", emax));
    // read out and back-substitute
    for (int j = 0; j < P; j++) begin
      for (int i = j; i < P; i++) begin
        @(negedge clk) rd_row = ($bits(rd_row))'(i); rd_col = ($bits(rd_col))'(j);
        #1; rr[j][i] = f(rd_data.re); ri[j][i] = f(rd_data.im);
      end
      @(negedge clk) rd_row = ($bits(rd_row))'(P); rd_col = ($bits(rd_col))'(j);
      #1; ur[j] = f(rd_data.re); ui[j] = f(rd_data.im);
    end
    for (int j = P - 1; j >= 0; j--) begin
      sr = ur[j]; si = ui[j];
      for (int i = j + 1; i < P; i++) begin
        sr -= rr[j][i] * w_r[i] - ri[j][i] * w_i[i];
        si -= rr[j][i] * w_i[i] + ri[j][i] * w_r[i];
      end
      if (rr[j][j] == 0.0) begin w_r[j] = 0; w_i[j] = 0; end
      else begin w_r[j] = sr / rr[j][j]; w_i[j] = si / rr[j][j]; end
    end
    if (noise != 0.0) begin
      real er, ei;
      er = yr[NV-1]; ei = yi[NV-1];
      for (int p = 0; p < P; p++) begin
        er -= xr[NV-1][p] * w_r[p] - xim[NV-1][p] * w_i[p];
        ei -= xr[NV-1][p] * w_i[p] + xim[NV-1][p] * w_r[p];
      end
      chk(fabs($sqrt(er*er + ei*ei) - $sqrt(elr*elr + eli*eli)) < 2e-3 && $sqrt(er*er + ei*ei) > 1e-3,
          $sformatf("last a-posteriori error |%f, %f| expected |%f, %f|", elr, eli, er, ei));
    end
    else for (int p = 0; p < P; p++) begin
      if (p == zero_row) chk(rr[p][p] == 0.0, "zero row transparent");
      else chk(fabs(w_r[p] - wr[p]) < 2e-3 && fabs(w_i[p] - wi[p]) < 2e-3,
               $sformatf("w[%0d] = %f, %fj, expected %f, %fj", p, w_r[p], w_i[p], wr[p], wi[p]));
    end
  endtask

  initial begin
    beta = q(0.9486833);
    for (int i = 0; i <= P; i++) begin x_in[i] = '0; x_valid[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    run(-1, 0.0);
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    run(2, 0.0);
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    run(-1, 0.1);
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
