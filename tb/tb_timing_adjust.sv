// tb_timing_adjust: a vector presented at step t must leave row i at step
// t+i, data and valid alike, and nothing may move without a step.
module tb_timing_adjust;
  import chsim_pkg::*;
  localparam int R = 6;
  logic clk = 0, rst = 1, step = 0;
  ecplx_t din [R], dout [R];
  logic vin [R], vout [R];
  int checks = 0, failures = 0;
  ecplx_t hist [$][R];
  logic vh [$][R];

  timing_adjust #(.R(R)) dut (.clk, .rst, .step, .din, .vin, .dout, .vout);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < R; i++) begin
        din[i] = '{re: ew_t'($urandom), im: ew_t'(t * 16 + i)};
        vin[i] = ($urandom % 3 != 0);
      end
      hist.push_front(din);
      vh.push_front(vin);
      #1;
      for (int i = 0; i < R; i++) if (t >= i) begin
        checks++;
        if (dout[i] != hist[i][i] || vout[i] != vh[i][i]) begin failures++; $display("FAIL t=%0d row %0d", t, i); end
      end
      repeat (3) @(negedge clk);   // no step: outputs must hold
      for (int i = 1; i < R; i++) if (t >= i) begin
        checks++;
        if (dout[i] != hist[i][i]) begin failures++; $display("FAIL hold t=%0d row %0d", t, i); end
      end
      step = 1;
      @(negedge clk) step = 0;
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
