// tb_rx_filter: impulse response equals the loaded coefficients, and a
// random input matches a direct convolution computed here.
module tb_rx_filter;
  import chsim_pkg::*;
  localparam int T = 8;
  logic clk = 0, rst = 1, ce = 0;
  cplx_t din, dout;
  smp_t coef [T];
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  int checks = 0, failures = 0;
  cplx_t hist [$];

  rx_filter #(.TAPS(T)) dut (.clk, .rst, .ce, .din, .coef, .dout);
  always #5 clk = ~clk;

  initial begin
    din = '0;
    for (int t = 0; t < T; t++) coef[t] = smp_t'($signed($urandom) >>> 12);
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      real er, ei;
      @(negedge clk);
      if (i < 20) din = (i == 0) ? '{re: ONE, im: -ONE} : '0;
      else din = '{re: smp_t'($signed($urandom) >>> 10), im: smp_t'($signed($urandom) >>> 10)};
      hist.push_front(din);
      er = 0; ei = 0;
      for (int t = 0; t < T && t < hist.size(); t++) begin
        er += real'(hist[t].re) * real'(coef[t]) / 2.0**FRAC;
        ei += real'(hist[t].im) * real'(coef[t]) / 2.0**FRAC;
      end
      ce = 1;
      @(negedge clk) ce = 0;
      checks++;
      if (i < T) begin
        if (dout.re != coef[i] || dout.im != -coef[i]) begin failures++; $display("FAIL impulse %0d", i); end
      end else if (fabs(real'(dout.re) - er) > T || fabs(real'(dout.im) - ei) > T) begin
        failures++; $display("FAIL conv %0d", i);
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
