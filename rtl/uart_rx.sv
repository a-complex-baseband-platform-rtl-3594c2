// uart_rx: RS232C receiver for the simulator's control link.
//
// 8 data bits, no parity, one stop bit, LSB first, idle high. The start
// bit edge is found on the synchronised input; each bit is sampled in its
// middle, CLKS_PER_BIT clocks apart. The default divides a 1.248 GHz link
// bit clock down to 115200 baud; the baud rate is this design's choice.
//
// Timing: `valid` pulses for one clock with `data` after the middle of the
// stop bit; a frame whose stop bit is low is dropped, and a new start bit
// is only accepted after the line has been seen high.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 10833
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);
  typedef enum logic [1:0] {IDLE, START, BITS, STOP} st_t;
  st_t                               st;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic [2:0]                        bitn;
  logic [1:0]                        sync;
  logic                              idle_hi;   // line seen high since last frame

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= IDLE;
      cnt   <= '0;
      bitn  <= '0;
      sync  <= 2'b11;
      idle_hi <= 1'b0;
      valid <= 1'b0;
      data  <= '0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (st)
        IDLE: if (sync[1]) idle_hi <= 1'b1;
        else if (idle_hi) begin
          st      <= START;
          cnt     <= '0;
          idle_hi <= 1'b0;
        end
        START: if (cnt == ($bits(cnt))'(CLKS_PER_BIT / 2 - 1)) begin
          cnt  <= '0;
          bitn <= '0;
          st   <= sync[1] ? IDLE : BITS;
        end else cnt <= cnt + 1'b1;
        BITS: if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
          cnt  <= '0;
          data <= {sync[1], data[7:1]};
          bitn <= bitn + 1'b1;
          if (bitn == 3'd7) st <= STOP;
        end else cnt <= cnt + 1'b1;
        STOP: if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
          st    <= IDLE;
          valid <= sync[1];
        end else cnt <= cnt + 1'b1;
      endcase
    end
  end
endmodule
