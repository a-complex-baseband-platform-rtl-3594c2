// tb_uart_rx: random bytes sent as 8N1 frames at CLKS_PER_BIT clocks per
// bit (with a small rate error) must come out unchanged; a frame with a
// low stop bit must be dropped.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 0, rst = 1, rxd = 1, valid;
  logic [7:0] data;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  int nvalid = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .valid, .data);
  always #5 clk = ~clk;

  task automatic send(input logic [7:0] b, input logic stop, input int cpb);
    rxd = 0; repeat (cpb) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (cpb) @(negedge clk); end
    rxd = stop; repeat (cpb) @(negedge clk);
    rxd = 1; repeat (cpb) @(negedge clk);
  endtask

  always @(posedge clk) if (!rst && valid) begin
    nvalid++;
    checks++;
    if (q.size() == 0 || data != q[0]) begin failures++; $display("FAIL got %h exp %h", data, q[0]); end
    if (q.size() > 0) void'(q.pop_front());
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      q.push_back(b);
      send(b, 1'b1, (i % 3 == 0) ? CPB + 1 : CPB);
    end
    send(8'h5A, 1'b0, CPB);   // framing error: no output
    repeat (20) @(negedge clk);
    checks++;
    if (nvalid != 50) begin failures++; $display("FAIL %0d bytes", nvalid); end
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
