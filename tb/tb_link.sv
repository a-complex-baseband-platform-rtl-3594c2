// tb_link: serializer -> deserializer over a serial line with an arbitrary
// bit offset. Checks that the receiver locks, then returns every sample,
// its UW flag and its sampling timing unchanged, one frame per FRAME_BITS
// clocks, and that lock is lost and regained after the line is corrupted.
module tb_link;
  import chsim_pkg::*;
  localparam int FB = 52;
  logic clk = 0, rst = 1, load = 0, uw = 0, corrupt = 0;
  cplx_t data;
  logic sout, line, valid, ruw, locked;
  cplx_t rdata;
  int checks = 0, failures = 0;
  cplx_t sent [$];
  logic  sent_uw [$];
  int last_valid = -1, cyc = 0, lock_events = 0;

  link_serializer   #(.FRAME_BITS(FB)) u_s (.clk, .rst, .load, .valid(1'b1), .uw, .data, .sout);
  // the line delays by 17 bits, so frames start off the receiver's initial phase
  logic [16:0] dl;
  always_ff @(posedge clk) dl <= {dl[15:0], sout};
  assign line = corrupt ? ~dl[16] : dl[16];
  link_deserializer #(.FRAME_BITS(FB)) u_d (.clk, .rst, .sin(line), .valid, .uw(ruw), .data(rdata), .locked);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  logic locked_q = 0;
  always @(posedge clk) begin
    locked_q <= locked;
    if (locked && !locked_q) lock_events++;
  end

  // sender: a new random sample every FB clocks
  initial begin
    data = '0;
    dl = '0;
    repeat (4) @(posedge clk);
    rst = 0;
    forever begin
      @(negedge clk);
      data = '{re: smp_t'($urandom), im: smp_t'($urandom)};
      uw = ($urandom % 5 == 0);
      load = 1;
      @(negedge clk) load = 0;
      sent.push_back(data); sent_uw.push_back(uw);
      repeat (FB - 2) @(negedge clk);
    end
  end

  // receiver: once locked, words arrive in order every FB clocks
  int got = 0;
  logic syncd = 0;
  always @(posedge clk) if (!rst && valid && !corrupt) begin
    if (!syncd) begin
      // drop words sent before the lock was seen by the sender
      while (sent.size() > 0 && sent[0] != rdata) begin void'(sent.pop_front()); void'(sent_uw.pop_front()); end
      syncd <= 1;
    end
    if (sent.size() > 0) begin
      checks++;
      if (sent[0] != rdata || sent_uw[0] != ruw) begin failures++; $display("FAIL word %0d got %h %b exp %h %b", got, rdata, ruw, sent[0], sent_uw[0]); end
      void'(sent.pop_front()); void'(sent_uw.pop_front());
      got++;
    end
    if (last_valid >= 0) begin
      checks++;
      if (cyc - last_valid != FB) begin failures++; $display("FAIL spacing %0d", cyc - last_valid); end
    end
    last_valid <= cyc;
  end

  initial begin
    wait (!rst);
    repeat (FB * 60) @(posedge clk);
    checks++; if (!locked) begin failures++; $display("FAIL no lock"); end
    checks++; if (got < 40) begin failures++; $display("FAIL only %0d words", got); end
    // corrupt the line: lock must drop, then come back
    corrupt = 1;
    repeat (FB * 8) @(posedge clk);
    checks++; if (locked) begin failures++; $display("FAIL lock kept on corrupt line"); end
    corrupt = 0;
    last_valid = -1;
    sent.delete(); sent_uw.delete(); syncd = 0;
    repeat (FB * 120) @(posedge clk);
    checks++; if (!locked || lock_events < 2) begin failures++; $display("FAIL relock (%0d)", lock_events); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
