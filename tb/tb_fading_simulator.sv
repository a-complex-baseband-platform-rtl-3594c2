// tb_fading_simulator: checks per-path delay and attenuation with fading
// off against a reference delay line kept here, then with fading on
// (f_D = 0, one component wave) that every path keeps |x|*attenuation,
// i.e. the envelope is a unit phasor.
module tb_fading_simulator;
  import chsim_pkg::*;
  localparam int K = 3;
  logic clk = 0, rst = 1, ce = 0, init = 0, fade_en = 0, uw_in = 0;
  cplx_t din;
  logic [6:0] delay [K];
  smp_t atten [K];
  logic [4:0] m_num [K];
  logic [15:0] theta0 [K];
  logic [31:0] seed [K];
  cplx_t path_out [K];
  logic uw_out;
  int checks = 0, failures = 0;
  cplx_t hist [$];

  fading_simulator #(.K(K)) dut (.clk, .rst, .ce, .din, .uw_in, .init, .fade_en, .fd_inc(32'd0),
    .delay, .atten, .m_num, .theta0, .seed, .path_out, .uw_out);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    din = '0;
    delay = '{7'd0, 7'd5, 7'd124};
    atten = '{ONE, smp_t'(ONE / 2), smp_t'(ONE / 4)};
    m_num = '{5'd1, 5'd1, 5'd1};
    theta0 = '{16'd0, 16'd100, 16'd200};
    seed = '{32'd11, 32'd22, 32'd33};
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      if (i == 200) begin
        // fading on: restart generators, run a few refreshes
        fade_en = 1;
        @(negedge clk) init = 1;
        @(negedge clk) init = 0;
        repeat (20) @(negedge clk);
      end
      @(negedge clk);
      din = '{re: smp_t'($signed($urandom) >>> 10), im: smp_t'($signed($urandom) >>> 10)};
      uw_in = (i % 7 == 0);
      hist.push_front(din);
      ce = 1;
      @(negedge clk) ce = 0;
      chk(uw_out == uw_in, "uw passes with one-sample latency");
      for (int k = 0; k < K; k++) begin
        if (i >= delay[k] && i < 200) begin
          chk(path_out[k] == cscale(hist[delay[k]], atten[k]), $sformatf("path %0d delay/atten at %0d", k, i));
        end else if (i >= 200 + delay[k] + 40) begin
          real a, b;
          cplx_t r;
          r = cscale(hist[delay[k]], atten[k]);
          a = $sqrt(real'(path_out[k].re)**2 + real'(path_out[k].im)**2);
          b = $sqrt(real'(r.re)**2 + real'(r.im)**2);
          chk(a > 0.97*b - 8 && a < 1.03*b + 8, $sformatf("path %0d faded magnitude %f vs %f", k, a, b));
        end
      end
    end
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
