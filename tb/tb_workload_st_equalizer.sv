// tb_workload_st_equalizer: runs the two estimator experiments of the
// platform on the full-size design (only the control-link bit time is
// shortened to 16 clocks so the many RS232C commands take little time).
//
// Experiment 1 (MMSE adaptive array with interference): 8-element
// half-wavelength linear array, QPSK at 4 samples/symbol, desired signal at
// 20 deg, interference at 40 deg and its one-symbol delayed copy at 60 deg,
// Eb/N0 = 20 dB, no fading, forgetting factor 0.9, 31-symbol unique word.
// The estimator rows are the 8 antennas. The weights, solved here from the
// cell contents, must pass 20 deg and put nulls (gain below 0.1 of the
// desired-direction gain) toward 40 and 60 deg.
//
// Experiment 2 (S/T-equalizers, 4 elements): desired signal at 20 deg, two
// copies of it delayed by one and two symbols at 5 and 35 deg, and an
// interferer at -40 deg. (a) Rows = 4 antennas only: the beam must null
// the interferer and both delayed desired components. (b) Rows = 4
// antennas + the unique word delayed by 1 and 2 symbols (time-domain
// taps): the interferer must still be nulled but the delayed desired
// directions must not be (their gain stays above 0.3 of the desired one),
// since the time-domain taps take care of them.
module tb_workload_st_equalizer;
  import chsim_pkg::*;
  localparam int CPB = 16, FL = 320, UL = 31, SPS = 4, P = 23;
  localparam int N = N_ELEM;
  localparam real PI = 3.141592653589793;
  localparam real A = 0.7071067811865476;

  logic clk = 0, rst = 1, uart_rxd = 1;
  cplx_t elem_out [N];
  logic elem_valid, elem_uw;
  logic link_locked [2 + K0];
  logic dsp_arm = 0, dsp_done;
  logic [$clog2(FL)-1:0] dsp_rd_sym = 0;
  logic [$clog2(N)-1:0] dsp_rd_elem = 0;
  cplx_t dsp_rd_data;
  logic est_trigger = 0, est_wr_en = 0, est_done, est_active, est_e_valid;
  logic [11:0] est_wr_addr = 0;
  logic [31:0] est_wr_data = 0;
  ecplx_t est_e, est_rd_data;
  logic [$clog2(P+1)-1:0] est_rd_row = 0, est_rd_col = 0;

  channel_platform #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .uart_rxd, .elem_out, .elem_valid, .elem_uw, .link_locked,
    .dsp_arm, .dsp_done, .dsp_rd_sym, .dsp_rd_elem, .dsp_rd_data,
    .est_trigger, .est_wr_en, .est_wr_addr, .est_wr_data, .est_done, .est_active,
    .est_e, .est_e_valid, .est_rd_row, .est_rd_col, .est_rd_data);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real w_r [P], w_i [P];

  function automatic real fe(input ew_t v);
    return real'(v) / 2.0**EFRAC;
  endfunction
  function automatic logic [15:0] ang(input real deg);
    return 16'($rtoi((deg < 0.0 ? deg + 360.0 : deg) / 360.0 * 65536.0 + 0.5));
  endfunction
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic send_byte(input logic [7:0] b);
    uart_rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(negedge clk); end
    uart_rxd = 1; repeat (CPB * 2) @(negedge clk);
  endtask
  task automatic cmd(input logic [7:0] a, input logic [31:0] v);
    send_byte(8'hA5); send_byte(a);
    for (int i = 3; i >= 0; i--) send_byte(v[i*8 +: 8]);
    repeat (4) @(negedge clk);
  endtask
  task automatic ew(input int a, input logic [31:0] d);
    @(negedge clk) est_wr_en = 1; est_wr_addr = 12'(a); est_wr_data = d;
    @(negedge clk) est_wr_en = 0;
  endtask
  // path k: gain, delay in samples, DOA in degrees
  task automatic path(input int k, input real g, input int d, input real deg);
    cmd(8'h10 + 8'(k), 32'($rtoi(g * 2.0**FRAC)));
    cmd(8'h18 + 8'(k), 32'(d));
    cmd(8'h20 + 8'(k), 32'(ang(deg)));
  endtask

  // estimation, then weights by back-substitution of R w = u
  task automatic estimate();
    real rr [P][P], ri [P][P], u_r [P], u_i [P], sr, si;
    int t;
    repeat (3 * FL * SPS * 52 / 2) @(negedge clk);   // let the new setting reach the outputs
    @(negedge clk) est_trigger = 1;
    @(negedge clk) est_trigger = 0;
    t = 0;
    while (!est_done && t < 400000) begin @(negedge clk); t++; end
    chk(est_done, "estimation done");
    repeat (10) @(negedge clk);
    for (int j = 0; j < P; j++) begin
      for (int i = j; i < P; i++) begin
        @(negedge clk) est_rd_row = ($bits(est_rd_row))'(i); est_rd_col = ($bits(est_rd_col))'(j);
        #1; rr[j][i] = fe(est_rd_data.re); ri[j][i] = fe(est_rd_data.im);
      end
      @(negedge clk) est_rd_row = ($bits(est_rd_row))'(P); est_rd_col = ($bits(est_rd_col))'(j);
      #1; u_r[j] = fe(est_rd_data.re); u_i[j] = fe(est_rd_data.im);
    end
    for (int j = P - 1; j >= 0; j--) begin
      sr = u_r[j]; si = u_i[j];
      for (int i = j + 1; i < P; i++) begin
        sr -= rr[j][i] * w_r[i] - ri[j][i] * w_i[i];
        si -= rr[j][i] * w_i[i] + ri[j][i] * w_r[i];
      end
      if (rr[j][j] > 1e-6) begin w_r[j] = sr / rr[j][j]; w_i[j] = si / rr[j][j]; end
      else begin w_r[j] = 0.0; w_i[j] = 0.0; end
    end
  endtask

  // beam gain |sum_n a_n(theta) w_n| over the first ne weights (rows = antennas 0..ne-1)
  function automatic real gain(input int ne, input real deg);
    real gr, gi, ph;
    gr = 0; gi = 0;
    for (int n = 0; n < ne; n++) begin
      ph = PI * n * $sin(deg * PI / 180.0);
      gr += $cos(ph) * w_r[n] - $sin(ph) * w_i[n];
      gi += $cos(ph) * w_i[n] + $sin(ph) * w_r[n];
    end
    return $sqrt(gr * gr + gi * gi);
  endfunction

  initial begin
    real A_UW [UL];
    logic [4:0] m;
    real g0, g1, g2, g3;
    m = 5'b00001;
    for (int s = 0; s < UL; s++) begin A_UW[s] = m[0] ? -A : A; m = {m[0] ^ m[3], m[4:1]}; end
    repeat (5) @(negedge clk);
    rst = 0;
    for (int s = 0; s < UL; s++) begin
      ew('h200 + s, 32'($rtoi(A_UW[s] * 2.0**FRAC)));
      ew('h300 + s, 32'($rtoi(A_UW[s] * 2.0**FRAC)));
    end

    // ---- experiment 1: N = 8, desired 20, interference 40 and 60 (delayed) ----
    path(0, 1.0, 0, 20.0);
    path(1, 0.0, 0, 0.0);
    path(2, 0.0, 0, 0.0);
    path(3, 1.0, 0, 40.0);
    path(4, 1.0, SPS, 60.0);
    for (int n = 0; n < N; n++) cmd(8'h38 + 8'(n), 32'($rtoi(0.05 * 2.0**FRAC)));   // Eb/N0 = 20 dB
    cmd(8'h00, 32'h0000_0080);
    cmd(8'h01, 32'h1);
    estimate();
    g0 = gain(8, 20.0); g1 = gain(8, 40.0); g2 = gain(8, 60.0);
    $display("N=8: gain 20 deg %f, 40 deg %f, 60 deg %f", g0, g1, g2);
    chk(g0 > 0.5, "N=8 desired direction passed");
    chk(g1 < 0.1 * g0 && g2 < 0.1 * g0, "N=8 nulls toward both interference components");

    // ---- experiment 2: N = 4 ----
    path(0, 1.0, 0, 20.0);
    path(1, 0.7, SPS, 5.0);
    path(2, 0.5, 2 * SPS, 35.0);
    path(3, 1.0, 0, -40.0);
    path(4, 0.0, 0, 0.0);
    for (int n = 4; n < N; n++) cmd(8'h38 + 8'(n), 32'h0);
    cmd(8'h00, 32'h0000_0040);
    cmd(8'h01, 32'h1);
    // (a) antennas only
    for (int i = 4; i < P; i++) ew('h100 + i, 32'h0);
    estimate();
    g0 = gain(4, 20.0); g1 = gain(4, 5.0); g2 = gain(4, 35.0); g3 = gain(4, -40.0);
    $display("N=4 (a): gain 20 deg %f, 5 deg %f, 35 deg %f, -40 deg %f", g0, g1, g2, g3);
    chk(g0 > 0.5, "(a) desired direction passed");
    chk(g3 < 0.1 * g0, "(a) null toward the interferer");
    chk(g1 < 0.1 * g0 && g2 < 0.1 * g0, "(a) nulls toward the delayed desired components");
    // (b) antennas + unique word delayed by 1 and 2 symbols
    ew('h104, 32'h0000_0102);
    ew('h105, 32'h0000_0202);
    estimate();
    g0 = gain(4, 20.0); g1 = gain(4, 5.0); g2 = gain(4, 35.0); g3 = gain(4, -40.0);
    $display("N=4 (b): gain 20 deg %f, 5 deg %f, 35 deg %f, -40 deg %f; taps %f,%f %f,%f",
             g0, g1, g2, g3, w_r[4], w_i[4], w_r[5], w_i[5]);
    chk(g0 > 0.5, "(b) desired direction passed");
    chk(g3 < 0.1 * g0, "(b) null toward the interferer");
    chk(g1 > 0.3 * g0 && g2 > 0.3 * g0, "(b) no nulls toward the delayed desired components");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
