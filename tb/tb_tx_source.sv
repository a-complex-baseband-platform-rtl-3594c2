// tb_tx_source: checks frame length, unique-word pattern and timing,
// symbol hold and QPSK/BPSK mapping of the transmitter against a model of
// the 31-chip m-sequence and the PN generator written here.
module tb_tx_source;
  import chsim_pkg::*;
  localparam int FL = 40, UL = 31, SPS = 3;
  logic clk = 0, rst = 1, ce = 0, bpsk = 0;
  cplx_t dout;
  logic uw, sym;
  int checks = 0, failures = 0;
  localparam smp_t A = smp_t'($rtoi(0.7071067811865476 * (2.0 ** FRAC)));

  tx_source #(.FRAME_LEN(FL), .UW_LEN(UL), .SPS(SPS)) dut (.clk, .rst, .ce, .bpsk, .seed(15'h1ACE), .uw_seed(5'b10110), .dout, .uw, .sym);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    logic [4:0] m;
    logic [14:0] pn;
    int s;
    repeat (3) @(posedge clk);
    rst = 0;
    // two frames of QPSK, then one of BPSK
    for (int f = 0; f < 3; f++) begin
      m  = 5'b10110;
      if (f == 0) pn = 15'h1ACE;
      bpsk = (f == 2);
      for (s = 0; s < FL; s++) begin
        cplx_t exp_v;
        if (s < UL) begin
          exp_v.re = m[0] ? -A : A;
          exp_v.im = exp_v.re;
          m = {m[0] ^ m[3], m[4:1]};
        end else if (bpsk) begin
          exp_v.re = pn[14] ? -ONE : ONE;
          exp_v.im = '0;
          pn = {pn[13:0], pn[14] ^ pn[13]};
        end else begin
          exp_v.re = pn[14] ? -A : A;
          exp_v.im = pn[13] ? -A : A;
          pn = {pn[12:0], pn[14] ^ pn[13], pn[13] ^ pn[12]};
        end
        for (int k = 0; k < SPS; k++) begin
          @(negedge clk) ce = 1;
          @(negedge clk) ce = 0;
          chk(dout == exp_v, $sformatf("frame %0d sym %0d sample %0d", f, s, k));
          chk(uw == (s == 0 && k == 0), "uw timing");
          chk(sym == (k == 0), "symbol timing");
        end
      end
    end
    // m-sequence property: 16 ones in the 31-chip word
    begin
      int ones = 0;
      m = 5'b00001;
      for (int i = 0; i < 31; i++) begin ones += m[0]; m = {m[0] ^ m[3], m[4:1]}; end
      chk(ones == 16, "m-sequence balance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
