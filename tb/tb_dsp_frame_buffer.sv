// tb_dsp_frame_buffer: a stream whose samples encode their own index is
// fed with a UW mark every frame; after arming, the buffer must capture
// exactly the FRAME_LEN symbols starting at the next UW (every SPS-th
// sample), ignore UW marks while unarmed, and read back every word.
module tb_dsp_frame_buffer;
  import chsim_pkg::*;
  localparam int N = 3, FL = 20, SPS = 4;
  logic clk = 0, rst = 1, ce = 0, uw_in = 0, arm = 0, done;
  cplx_t elem_in [N];
  logic [$clog2(FL)-1:0] rd_sym = 0;
  logic [$clog2(N)-1:0] rd_elem = 0;
  cplx_t rd_data;
  int checks = 0, failures = 0;
  int uw_at [$];

  dsp_frame_buffer #(.N(N), .FRAME_LEN(FL), .SPS(SPS)) dut (.clk, .rst, .ce, .elem_in, .uw_in, .arm, .done, .rd_sym, .rd_elem, .rd_data);
  always #5 clk = ~clk;

  initial begin
    int idx, first;
    repeat (3) @(negedge clk);
    rst = 0;
    idx = 0;
    for (int f = 0; f < 2; f++) begin
      // stream: UW every FL*SPS+7 samples (frame boundaries)
      for (int s = 0; s < 3 * (FL * SPS + 7); s++) begin
        @(negedge clk);
        if (f == 1 && s == 100) arm = 1; else arm = 0;
        if (f == 0 && s == 5) arm = 1;
        for (int n = 0; n < N; n++) elem_in[n] = '{re: smp_t'(idx), im: smp_t'(n)};
        uw_in = (s % (FL * SPS + 7) == 3);
        if (uw_in) uw_at.push_back(idx);
        ce = 1;
        @(negedge clk) ce = 0; arm = 0;
        idx++;
      end
      checks++;
      if (!done) begin failures++; $display("FAIL no done"); end
      // the first UW after arming
      first = -1;
      foreach (uw_at[i]) if (first < 0 && uw_at[i] > ((f == 0) ? 5 : 100 + (3 * (FL * SPS + 7)))) first = uw_at[i];
      for (int s = 0; s < FL; s++)
        for (int n = 0; n < N; n++) begin
          @(negedge clk) rd_sym = ($bits(rd_sym))'(s); rd_elem = ($bits(rd_elem))'(n);
          @(negedge clk);
          checks++;
          if (rd_data.re != smp_t'(first + s * SPS) || rd_data.im != smp_t'(n)) begin
            failures++; $display("FAIL f%0d sym %0d elem %0d: %0d mem=%0d first=%0d", f, s, n, rd_data.re, dut.mem[s][n].re, first);
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
