// tb_channel_platform: end-to-end test of the whole platform at reduced
// size (16 clocks per UART bit, 64-symbol frames, 12-row estimator).
//
// Phase A: after the seven serial links lock, the control PC (modelled
// here as an RS232C byte sender) switches off every path but desired path
// 0, points it at 20 degrees and applies. Every element output during the
// unique word must then equal the unique-word symbol (the m-sequence,
// generated here) times exp(j*pi*n*sin(20 deg)), with the frame mark at
// the first unique-word sample. The DSP frame buffer is armed and its
// captured frame is read back and compared with the element samples seen.
// Phase B: a delayed desired path, an interfering path, noise and fading
// of the desired user are switched on; the estimator gets the unique word
// and is triggered (a second trigger while it runs must be ignored). Its
// a-posteriori errors must be small and the weights, solved here from the
// cell contents, must pass the desired direction and reject the
// interferer's.
// Phase C: mode switches: circular array with 6 elements (coefficients
// checked against the formula computed here) and BPSK transmitters (data
// samples after the link must be real and of unit size).
// Every mechanism is counted; one that never happened is a failure.
module tb_channel_platform;
  import chsim_pkg::*;
  localparam int CPB = 16, FL = 64, UL = 31, SPS = 4, P = 12, UW_MAX = 32, SLOT = 72;
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

  channel_platform #(.CLKS_PER_BIT(CPB), .TX_FRAME_LEN(FL), .TX_UW_LEN(UL), .SPS(SPS),
                     .P(P), .UW_MAX(UW_MAX), .SLOT(SLOT)) dut (
    .clk, .rst, .uart_rxd, .elem_out, .elem_valid, .elem_uw, .link_locked,
    .dsp_arm, .dsp_done, .dsp_rd_sym, .dsp_rd_elem, .dsp_rd_data,
    .est_trigger, .est_wr_en, .est_wr_addr, .est_wr_data, .est_done, .est_active,
    .est_e, .est_e_valid, .est_rd_row, .est_rd_col, .est_rd_data);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_lock = 0, n_uart = 0, n_coef = 0, n_fade = 0, n_delay = 0, n_noise = 0;
  int n_dsp = 0, n_est = 0, n_ignored = 0, n_circ = 0, n_bpsk = 0, n_uwchk = 0;

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real fr(input smp_t v);
    return real'(v) / 2.0**FRAC;
  endfunction
  function automatic real fe(input ew_t v);
    return real'(v) / 2.0**EFRAC;
  endfunction
  function automatic logic [15:0] ang(input real deg);
    return 16'($rtoi((deg < 0.0 ? deg + 360.0 : deg) / 360.0 * 65536.0 + 0.5));
  endfunction
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // control PC: one command = sync byte, address, 32-bit value MSB first
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
  task automatic wait_samples(input int n);
    for (int i = 0; i < n; i++) @(posedge elem_valid);
  endtask

  // unique word of the desired user (m-sequence x^5+x^2+1 from state 00001)
  real uw_sym [UL];
  initial begin
    logic [4:0] m;
    m = 5'b00001;
    for (int s = 0; s < UL; s++) begin
      uw_sym[s] = m[0] ? -A : A;
      m = {m[0] ^ m[3], m[4:1]};
    end
  end

  // element sample recorder: position in frame, and a captured frame
  int   pos = -1;
  logic rec_arm = 0, rec_on = 0, rec_full = 0;
  cplx_t rec [FL * SPS][N];
  logic  uw_check = 0;
  real   a_re [N], a_im [N];
  always @(posedge clk) if (!rst && elem_valid) begin
    if (elem_uw) pos = 0;
    else if (pos >= 0) pos++;
    if (elem_uw && rec_arm && !rec_on) begin rec_on = 1; rec_arm = 0; end
    if (rec_on && pos < FL * SPS) rec[pos] = elem_out;
    if (rec_on && pos == FL * SPS - 1) begin rec_on = 0; rec_full = 1; end
    if (uw_check && pos >= 0 && pos < UL * SPS) begin
      for (int n = 0; n < N; n++) begin
        real er, ei;
        er = uw_sym[pos / SPS] * (a_re[n] - a_im[n]);
        ei = uw_sym[pos / SPS] * (a_re[n] + a_im[n]);
        chk(fabs(fr(elem_out[n].re) - er) < 4e-3 && fabs(fr(elem_out[n].im) - ei) < 4e-3,
            $sformatf("elem %0d sample %0d: %f %f expected %f %f", n, pos,
                      fr(elem_out[n].re), fr(elem_out[n].im), er, ei));
      end
      n_uwchk++;
    end
  end

  // mechanism monitors
  logic cb_q = 0;
  smp_t z_prev = '0;
  always @(posedge clk) if (!rst) begin
    cb_q <= dut.coef_busy;
    if (dut.coef_busy && !cb_q) n_coef++;
    if (dut.coef_busy && !cb_q && dut.u_ctrl.circular) n_circ++;
    if (dut.u_ctrl.wr) n_uart++;
    if (dut.fs_ce[0] && dut.fade_en[0]) begin
      if (dut.u_fs_d.z[0].re != z_prev) n_fade++;
      z_prev <= dut.u_fs_d.z[0].re;
    end
    if (dut.fs_ce[0] && dut.delay[1] != 0 && dut.atten[1] != 0) n_delay++;
    if (elem_valid && dut.noise_lvl[0] != 0) n_noise++;
    if (dsp_done) n_dsp++;
    if (est_done) n_est++;
    if (est_trigger && est_active) n_ignored++;
  end

  // estimator error monitor
  int  ne = 0;
  real esum = 0.0;
  always @(posedge clk) if (!rst && est_e_valid && dut.u_est.step) begin
    if (ne > P) esum += fe(est_e.re) ** 2 + fe(est_e.im) ** 2;
    ne++;
  end

  initial begin
    int t;
    real th;
    repeat (5) @(negedge clk);
    rst = 0;

    // ---- links ----
    t = 0;
    while (t < 40000) begin
      logic all;
      all = 1;
      for (int i = 0; i < 2 + K0; i++) all &= link_locked[i];
      if (all) break;
      @(negedge clk); t++;
    end
    for (int i = 0; i < 2 + K0; i++) begin
      chk(link_locked[i], $sformatf("link %0d locked", i));
      if (link_locked[i]) n_lock++;
    end

    // ---- phase A: one desired path at 20 degrees ----
    for (int k = 1; k < K0; k++) cmd(8'h10 + 8'(k), 32'h0);
    cmd(8'h20, 32'(ang(20.0)));
    cmd(8'h01, 32'h1);
    th = 20.0 * PI / 180.0;
    for (int n = 0; n < N; n++) begin
      a_re[n] = $cos(PI * n * $sin(th));
      a_im[n] = $sin(PI * n * $sin(th));
    end
    wait_samples(8);
    uw_check = 1;
    @(negedge clk) dsp_arm = 1; rec_arm = 1;
    @(negedge clk) dsp_arm = 0;
    t = 0;
    while (!dsp_done && t < 100000) begin @(negedge clk); t++; end
    chk(dsp_done, "DSP frame captured");
    uw_check = 0;
    chk(n_uwchk >= UL * SPS, $sformatf("unique word checked at %0d samples", n_uwchk));
    wait (rec_full);
    for (int s = 0; s < FL; s++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk) dsp_rd_sym = ($bits(dsp_rd_sym))'(s); dsp_rd_elem = ($bits(dsp_rd_elem))'(n);
        @(negedge clk);
        chk(dsp_rd_data == rec[s * SPS][n], $sformatf("DSP frame sym %0d elem %0d", s, n));
      end

    // ---- phase B: delayed path, interferer, noise, fading ----
    cmd(8'h11, 32'(ONE / 2));           // desired path 1: 0.5, 4 samples late, -30 deg
    cmd(8'h19, 32'd4);
    cmd(8'h21, 32'(ang(-30.0)));
    cmd(8'h13, 32'($rtoi(0.7 * 2.0**FRAC)));   // interferer path 0: 0.7, 50 deg
    cmd(8'h23, 32'(ang(50.0)));
    for (int n = 0; n < N; n++) cmd(8'h38 + 8'(n), 32'($rtoi(0.02 * 2.0**FRAC)));
    cmd(8'h00, 32'h0000_0081);          // fading on (desired), linear, 8 elements
    cmd(8'h01, 32'h1);
    for (int s = 0; s < UL; s++) begin
      ew('h200 + s, 32'($rtoi(uw_sym[s] * 2.0**FRAC)));
      ew('h300 + s, 32'($rtoi(uw_sym[s] * 2.0**FRAC)));
    end
    wait_samples(16);
    @(negedge clk) est_trigger = 1;
    @(negedge clk) est_trigger = 0;
    wait_samples(8);
    @(negedge clk) est_trigger = 1;     // ignored: estimation running
    @(negedge clk) est_trigger = 0;
    t = 0;
    while (!est_done && t < 200000) begin @(negedge clk); t++; end
    chk(est_done, "estimation done");
    repeat (SLOT * 3) @(negedge clk);
    chk(ne == UL, $sformatf("%0d a-posteriori errors", ne));
    chk(esum / (UL - P - 1) < 0.02, $sformatf("mean error power %f", esum / (UL - P - 1)));
    begin
      real rr [P][P], ri [P][P], u_r [P], u_i [P], w_r [P], w_i [P], sr, si;
      real gdr, gdi, gir, gii, thi;
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
      // array gain towards the desired and the interfering direction
      gdr = 0; gdi = 0; gir = 0; gii = 0;
      thi = 50.0 * PI / 180.0;
      for (int n = 0; n < N; n++) begin
        real pd, pi_;
        pd  = PI * n * $sin(th);
        pi_ = PI * n * $sin(thi);
        gdr += $cos(pd) * w_r[n] - $sin(pd) * w_i[n];
        gdi += $cos(pd) * w_i[n] + $sin(pd) * w_r[n];
        gir += $cos(pi_) * w_r[n] - $sin(pi_) * w_i[n];
        gii += $cos(pi_) * w_i[n] + $sin(pi_) * w_r[n];
      end
      $display("array gain: desired %f, interferer %f", $sqrt(gdr*gdr + gdi*gdi), $sqrt(gir*gir + gii*gii));
      chk($sqrt(gdr*gdr + gdi*gdi) > 0.5, "desired direction passed");
      chk($sqrt(gir*gir + gii*gii) < 0.25 * $sqrt(gdr*gdr + gdi*gdi), "interferer rejected");
    end

    // ---- phase C: circular array, 6 elements; BPSK ----
    cmd(8'h00, 32'h0000_0164);
    cmd(8'h01, 32'h1);
    repeat (K0 * N + 10) @(negedge clk);
    for (int k = 0; k < K0; k++) begin
      real dk;
      dk = real'(dut.u_ctrl.doa[k]) / 65536.0 * 2.0 * PI;
      for (int n = 0; n < N; n++) begin
        real ph, er, ei;
        ph = -(PI / (2.0 * $sin(PI / 6.0))) * $cos(dk - 2.0 * PI * n / 6.0);
        er = (n < 6) ? $cos(ph) : 0.0;
        ei = (n < 6) ? $sin(ph) : 0.0;
        chk(fabs(fr(dut.coef[k][n].re) - er) < 4e-3 && fabs(fr(dut.coef[k][n].im) - ei) < 4e-3,
            $sformatf("circular coef path %0d elem %0d", k, n));
      end
    end
    wait_samples(FL * SPS + 8);
    for (int i = 0; i < 4 * FL; i++) begin
      @(posedge dut.fs_ce[0]);
      if (dut.u_fs_d.uw_in) break;
    end
    for (int i = 0; i < FL * SPS; i++) begin
      @(posedge clk);
      while (!dut.fs_ce[0]) @(posedge clk);
      if (i >= UL * SPS) begin
        chk(dut.fs_in[0].im == 0 && (dut.fs_in[0].re == ONE || dut.fs_in[0].re == -ONE),
            $sformatf("BPSK sample %0d", i));
        n_bpsk++;
      end
    end

    // ---- mechanism coverage ----
    $display("mechanisms: lock=%0d uart=%0d coef=%0d fade=%0d delay=%0d noise=%0d dsp=%0d est=%0d ignored=%0d circ=%0d bpsk=%0d uw=%0d",
             n_lock, n_uart, n_coef, n_fade, n_delay, n_noise, n_dsp, n_est, n_ignored, n_circ, n_bpsk, n_uwchk);
    chk(n_lock == 2 + K0, "all links locked");
    chk(n_uart > 0, "UART commands");
    chk(n_coef >= 3, "coefficient passes");
    chk(n_fade > 0, "fading");
    chk(n_delay > 0, "path delay");
    chk(n_noise > 0, "noise");
    chk(n_dsp > 0, "DSP capture");
    chk(n_est == 1, "one estimation");
    chk(n_ignored > 0, "trigger ignored while running");
    chk(n_circ > 0, "circular array");
    chk(n_bpsk > 0, "BPSK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
