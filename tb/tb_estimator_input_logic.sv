// tb_estimator_input_logic: configures antenna rows (in a permuted order),
// two delayed-unique-word rows and one empty row, triggers, and streams
// samples that encode their own index. After the next UW mark, every
// issued vector must hold the element samples of training symbol s
// (every SPS-th sample), the unique word delayed by the row's number of
// symbols (zero before it starts), zero for the empty row, and the
// undelayed unique word in the reference row; `done` must follow 2P+2
// steps after the last vector.
module tb_estimator_input_logic;
  import chsim_pkg::*;
  localparam int P = 6, N = 3, UW_MAX = 16, SPS = 2, UL = 9;
  logic clk = 0, rst = 1, ce = 0, uw_in = 0, trigger = 0, step = 0;
  cplx_t elem_in [N];
  logic [1:0] row_kind [P];
  logic [4:0] row_idx [P];
  logic [$clog2(UW_MAX+1)-1:0] uw_len = UL;
  cplx_t uw_ref [UW_MAX];
  ecplx_t row_out [P+1];
  logic row_valid [P+1];
  logic capturing, feeding, done;
  int checks = 0, failures = 0;
  logic seen_done = 0;
  always @(posedge clk) if (!rst && done) seen_done <= 1;

  estimator_input_logic #(.P(P), .N(N), .UW_MAX(UW_MAX), .SPS(SPS)) dut (.clk, .rst, .ce, .elem_in, .uw_in,
    .trigger, .step, .row_kind, .row_idx, .uw_len, .uw_ref, .row_out, .row_valid, .capturing, .feeding, .done);
  always #5 clk = ~clk;

  function automatic ecplx_t w(input cplx_t v);
    return '{re: ew_t'(v.re) * 16, im: ew_t'(v.im) * 16};
  endfunction
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int uw_idx, s, nsteps;
    row_kind = '{2'd1, 2'd1, 2'd1, 2'd2, 2'd2, 2'd0};
    row_idx  = '{5'd2, 5'd0, 5'd1, 5'd1, 5'd2, 5'd0};
    for (int i = 0; i < UW_MAX; i++) uw_ref[i] = '{re: smp_t'(1000 + i), im: smp_t'(-i)};
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk) trigger = 1;
    @(negedge clk) trigger = 0;
    chk(capturing, "capturing after trigger");
    // stream samples; UW mark at sample 7
    uw_idx = 7;
    for (int i = 0; i < 60; i++) begin
      for (int n = 0; n < N; n++) elem_in[n] = '{re: smp_t'(i), im: smp_t'(n)};
      uw_in = (i == uw_idx);
      ce = 1;
      @(negedge clk) ce = 0;
      @(negedge clk);
    end
    chk(feeding, "feeding after capture");
    // issue steps
    s = 0;
    nsteps = 0;
    while (!seen_done && nsteps < 100) begin
      @(negedge clk) step = 1;
      @(negedge clk) step = 0;
      nsteps++;
      if (s < UL) begin
        for (int i = 0; i < P; i++) begin
          ecplx_t ex;
          case (row_kind[i])
            2'd1: ex = w('{re: smp_t'(uw_idx + s * SPS), im: smp_t'(row_idx[i])});
            2'd2: ex = (s >= row_idx[i]) ? w(uw_ref[s - row_idx[i]]) : '0;
            default: ex = '0;
          endcase
          chk(row_valid[i] && row_out[i] == ex, $sformatf("symbol %0d row %0d", s, i));
        end
        chk(row_valid[P] && row_out[P] == w(uw_ref[s]), $sformatf("symbol %0d reference", s));
        s++;
      end else begin
        @(negedge clk);
        if (!seen_done) chk(!row_valid[0], "no vector during drain");
      end
    end
    chk(nsteps == UL + 2 * P + 2, $sformatf("done after %0d steps", nsteps));
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
