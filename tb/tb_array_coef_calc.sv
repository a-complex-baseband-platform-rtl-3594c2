// tb_array_coef_calc: array-response coefficients against the closed-form
// expressions evaluated here in real arithmetic, for a linear and a
// circular array and several element counts; unused elements must be 0,
// and one pass must take NP*N clocks.
module tb_array_coef_calc;
  import chsim_pkg::*;
  localparam int NP = 5, N = 8;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst = 1, start = 0, circular = 0, busy, wr_en;
  logic [3:0] n_elem = 8;
  logic [15:0] doa [NP];
  logic [2:0] wr_path;
  logic [3:0] wr_elem;
  cplx_t wr_coef;
  int checks = 0, failures = 0;
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  array_coef_calc #(.NP(NP), .N(N)) dut (.clk, .rst, .start, .circular, .n_elem, .doa, .busy, .wr_en, .wr_path, .wr_elem, .wr_coef);
  always #5 clk = ~clk;

  task automatic run_pass(input logic circ, input int ne);
    int nw, cyc;
    circular = circ; n_elem = 4'(ne);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    nw = 0; cyc = 0;
    while (busy || wr_en) begin
      if (wr_en) begin
        real th, ph, er, ei, tol;
        th = 2.0 * PI * real'(doa[wr_path]) / 65536.0;
        if (!circ) ph = PI * real'(wr_elem) * $sin(th);
        else if (ne == 1) ph = 0.0;
        else ph = -(PI / (2.0 * $sin(PI / ne))) * $cos(th - 2.0 * PI * real'(wr_elem) / ne);
        er = (int'(wr_elem) < ne) ? $cos(ph) : 0.0;
        ei = (int'(wr_elem) < ne) ? $sin(ph) : 0.0;
        tol = 0.02;
        checks++;
        if (fabs(real'(wr_coef.re) / 2.0**FRAC - er) > tol || fabs(real'(wr_coef.im) / 2.0**FRAC - ei) > tol) begin
          failures++;
          $display("FAIL circ=%0d ne=%0d path %0d elem %0d: %f %f exp %f %f", circ, ne, wr_path, wr_elem,
                   real'(wr_coef.re) / 2.0**FRAC, real'(wr_coef.im) / 2.0**FRAC, er, ei);
        end
        nw++;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (nw != NP * N) begin failures++; $display("FAIL %0d writes", nw); end
  endtask

  initial begin
    // 20, 40, 60 degrees, -30, 90
    doa = '{16'd3641, 16'd7282, 16'd10923, 16'(-5461), 16'd16384};
    repeat (3) @(posedge clk);
    rst = 0;
    run_pass(0, 8);
    run_pass(0, 4);
    run_pass(1, 8);
    run_pass(1, 6);
    run_pass(1, 1);
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
