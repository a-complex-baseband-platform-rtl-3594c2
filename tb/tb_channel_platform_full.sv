// tb_channel_platform_full: the platform at its full size (every parameter
// at its default: 52-bit link frames, 320-symbol frames, 31-symbol unique
// word, 23-row estimator, 115.2 kbit/s control link at 1.248 GHz clock).
//
// One complete operation from the reset configuration: all five paths at
// gain 1, no delay and broadside (DOA 0), fading off, 8-element linear
// array. The test waits for all seven serial links to lock and checks
// every element output during a unique word against 3*uw_d + 2*uw_i (three
// desired and two interfering paths, unique words generated here from
// their m-sequence states). It then loads that sum as the estimator's
// reference, triggers an estimation and checks that it completes with
// near-zero a-posteriori errors, captures one frame through the DSP frame
// buffer and reads part of it back, and finally sends one RS232C command at
// the real bit rate that switches fading on for both users; fading must
// then change the element outputs.
module tb_channel_platform_full;
  import chsim_pkg::*;
  localparam int FL = 320, UL = 31, SPS = 4, P = 23, CPB = 10833;
  localparam int N = N_ELEM;
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

  channel_platform dut (
    .clk, .rst, .uart_rxd, .elem_out, .elem_valid, .elem_uw, .link_locked,
    .dsp_arm, .dsp_done, .dsp_rd_sym, .dsp_rd_elem, .dsp_rd_data,
    .est_trigger, .est_wr_en, .est_wr_addr, .est_wr_data, .est_done, .est_active,
    .est_e, .est_e_valid, .est_rd_row, .est_rd_col, .est_rd_data);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real fr(input smp_t v);
    return real'(v) / 2.0**FRAC;
  endfunction
  function automatic real fe(input ew_t v);
    return real'(v) / 2.0**EFRAC;
  endfunction
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  task automatic send_byte(input logic [7:0] b);
    uart_rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(negedge clk); end
    uart_rxd = 1; repeat (CPB) @(negedge clk);
  endtask
  task automatic ew(input int a, input logic [31:0] d);
    @(negedge clk) est_wr_en = 1; est_wr_addr = 12'(a); est_wr_data = d;
    @(negedge clk) est_wr_en = 0;
  endtask
  task automatic wait_samples(input int n);
    for (int i = 0; i < n; i++) @(posedge elem_valid);
  endtask

  // element value during the unique word: 3 desired + 2 interfering paths
  real ref_sym [UL];
  initial begin
    logic [4:0] md, mi;
    md = 5'b00001; mi = 5'b10110;
    for (int s = 0; s < UL; s++) begin
      ref_sym[s] = 3.0 * (md[0] ? -A : A) + 2.0 * (mi[0] ? -A : A);
      md = {md[0] ^ md[3], md[4:1]};
      mi = {mi[0] ^ mi[3], mi[4:1]};
    end
  end

  int   pos = -1, n_uw = 0, n_fade = 0;
  logic uw_check = 0, fade_check = 0;
  cplx_t rec [FL];
  always @(posedge clk) if (!rst && elem_valid) begin
    if (elem_uw) pos = 0;
    else if (pos >= 0) pos++;
    if (pos >= 0 && pos < FL * SPS && pos % SPS == 0) rec[pos / SPS] = elem_out[3];
    if (pos >= 0 && pos < UL * SPS) begin
      for (int n = 0; n < N; n++) begin
        logic ok;
        ok = fabs(fr(elem_out[n].re) - ref_sym[pos / SPS]) < 1e-4 &&
             fabs(fr(elem_out[n].im) - ref_sym[pos / SPS]) < 1e-4;
        if (uw_check) chk(ok, $sformatf("elem %0d sample %0d: %f %f expected %f", n, pos,
                                        fr(elem_out[n].re), fr(elem_out[n].im), ref_sym[pos / SPS]));
        if (fade_check && !ok) n_fade++;
      end
      if (uw_check) n_uw++;
    end
  end

  int  ne = 0;
  real emax = 0.0;
  always @(posedge clk) if (!rst && est_e_valid && dut.u_est.step) begin
    if (ne > 0 && fabs(fe(est_e.re)) + fabs(fe(est_e.im)) > emax) emax = fabs(fe(est_e.re)) + fabs(fe(est_e.im));
    ne++;
  end

  initial begin
    int t;
    logic all;
    repeat (5) @(negedge clk);
    rst = 0;
    t = 0;
    all = 0;
    while (!all && t < 200000) begin
      all = 1;
      for (int i = 0; i < 2 + K0; i++) all &= link_locked[i];
      @(negedge clk); t++;
    end
    chk(all, "all links locked");
    $display("links locked after %0d clocks", t);

    // one unique word at the element outputs
    uw_check = 1;
    while (pos < 0 || pos >= UL * SPS) @(negedge clk);
    while (pos < UL * SPS) @(negedge clk);
    uw_check = 0;
    chk(n_uw == UL * SPS, $sformatf("%0d unique-word samples checked", n_uw));

    // estimator: reference = the element signal itself
    ew('h000, 32'd15099494);    // lambda = 0.9
    for (int s = 0; s < UL; s++) begin
      ew('h200 + s, 32'($rtoi(ref_sym[s] * 2.0**FRAC)));
      ew('h300 + s, 32'($rtoi(ref_sym[s] * 2.0**FRAC)));
    end
    @(negedge clk) est_trigger = 1;
    @(negedge clk) est_trigger = 0;
    t = 0;
    while (!est_done && t < 400000) begin @(negedge clk); t++; end
    chk(est_done, "estimation done");
    repeat (200) @(negedge clk);
    chk(ne == UL, $sformatf("%0d a-posteriori errors", ne));
    chk(emax < 1e-3, $sformatf("largest a-posteriori error %g", emax));

    // DSP frame
    @(negedge clk) dsp_arm = 1;
    @(negedge clk) dsp_arm = 0;
    t = 0;
    while (!dsp_done && t < 200000) begin @(negedge clk); t++; end
    chk(dsp_done, "DSP frame captured");
    for (int s = 0; s < FL; s += 7) begin
      @(negedge clk) dsp_rd_sym = ($bits(dsp_rd_sym))'(s); dsp_rd_elem = 3'd3;
      @(negedge clk);
      chk(dsp_rd_data == rec[s], $sformatf("DSP frame symbol %0d", s));
    end

    // control PC at 115.2 kbit/s: fading on for both users (the fading
    // generators have been running since the pass started at reset)
    send_byte(8'hA5); send_byte(8'h00);
    send_byte(8'h00); send_byte(8'h00); send_byte(8'h00); send_byte(8'h83);
    repeat (10) @(negedge clk);
    chk(dut.fade_en[0] && dut.fade_en[1], "fading switched on over RS232C");
    fade_check = 1;
    wait_samples(FL * SPS + 10);
    fade_check = 0;
    chk(n_fade > 0, $sformatf("fading changed %0d element samples", n_fade));

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
