// tb_sim_controller: checks reset values, register writes sent as RS232C
// commands, that bytes without the sync byte are ignored, and that the
// apply command restarts the fading generators and rewrites the
// array-response coefficients from the new DOA (checked against
// exp(j*pi*n*sin(theta)) computed here).
module tb_sim_controller;
  import chsim_pkg::*;
  localparam int CPB = 16, NP = 5, N = 8, T = 8;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst = 1, rxd = 1;
  logic fade_en [2];
  logic bpsk, fade_init, coef_busy;
  logic [31:0] fd_inc [2];
  logic [6:0] delay [NP];
  smp_t atten [NP];
  logic [4:0] m_num [NP];
  logic [15:0] theta0 [NP];
  cplx_t coef [NP][N];
  smp_t noise_lvl [N];
  smp_t fir_coef [T];
  int checks = 0, failures = 0, inits = 0;
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  sim_controller #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .fade_en, .bpsk, .fade_init, .fd_inc,
    .delay, .atten, .m_num, .theta0, .coef, .noise_lvl, .fir_coef, .coef_busy);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && fade_init) inits++;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic send_byte(input logic [7:0] b);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = 1; repeat (CPB * 2) @(negedge clk);
  endtask
  task automatic cmd(input logic [7:0] a, input logic [31:0] v);
    send_byte(8'hA5); send_byte(a);
    for (int i = 3; i >= 0; i--) send_byte(v[8*i +: 8]);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (!coef_busy);
    repeat (50) @(negedge clk);
    // reset state: unit attenuation, linear array at broadside: coefficients 1
    chk(atten[0] == ONE && delay[4] == 0 && m_num[2] == 8 && fir_coef[0] == ONE && fir_coef[1] == 0, "reset values");
    chk(fabs(real'(coef[3][5].re) / 2.0**FRAC - 1.0) < 0.01, "reset coefficient");
    chk(inits == 1, "fading started after reset");
    cmd(8'h11, 32'h0008_0000);   // attenuation path 1 = 0.5
    cmd(8'h1C, 32'd100);         // delay path 4
    cmd(8'h2A, 32'h4000_0003);   // path 2: 3 waves, Theta_0 = 1/4 turn
    cmd(8'h31, 32'd12345);       // Doppler interferer
    cmd(8'h3B, 32'h0004_0000);   // noise element 3 = 0.25
    cmd(8'h41, 32'hFFF0_0000);   // filter tap 1 = -1
    cmd(8'h00, 32'h0000_0183);   // fading on both, BPSK, 8 elements, linear
    send_byte(8'h22); send_byte(8'h33);   // no sync byte: ignored
    cmd(8'h20, 32'd3641);        // DOA path 0 = 20 degrees
    chk(atten[1] == smp_t'(ONE / 2), "attenuation write");
    chk(delay[4] == 7'd100, "delay write");
    chk(m_num[2] == 5'd3 && theta0[2] == 16'h4000, "component waves write");
    chk(fd_inc[1] == 32'd12345 && fd_inc[0] == 32'd357914, "Doppler write");
    chk(noise_lvl[3] == smp_t'(ONE / 4), "noise write");
    chk(fir_coef[1] == -ONE, "filter write");
    chk(fade_en[0] && fade_en[1] && bpsk, "control write");
    chk(fabs(real'(coef[0][1].re) / 2.0**FRAC - 1.0) < 0.01, "coefficient unchanged before apply");
    cmd(8'h01, 32'd1);           // apply
    wait (!coef_busy);
    repeat (3) @(negedge clk);
    chk(inits == 2, "apply restarts fading");
    for (int n = 0; n < N; n++) begin
      real ph;
      ph = PI * n * $sin(2.0 * PI * 3641.0 / 65536.0);
      chk(fabs(real'(coef[0][n].re) / 2.0**FRAC - $cos(ph)) < 0.02 &&
          fabs(real'(coef[0][n].im) / 2.0**FRAC - $sin(ph)) < 0.02, $sformatf("coef elem %0d", n));
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
