// link_serializer: parallel-to-serial side of a fiber link between units.
//
// Each 48-bit complex sample (24-bit I + 24-bit Q) travels with two timing
// bits, the sampling timing and the unique-word timing, as one 52-bit frame:
// a 2-bit alignment header "10", the sampling-timing bit, the UW bit, then
// Q and I data, MSB first. 52 bits at 24 Msamples/s is 1.248 Gb/s; the
// header is this design's stand-in for the link overhead and lets the
// deserializer find frame boundaries.
//
// Timing: the module runs on the bit clock. A pulse on `load` latches
// {valid, uw, data} and restarts the frame; `load` must come every FRAME_BITS
// clocks (it is the sample strobe of the sending unit). Without loads, idle
// frames (header, sampling-timing bit clear, zero data) are sent. `sout` is the
// registered serial output; the first header bit leaves one clock after load.
module link_serializer
  import chsim_pkg::*;
#(
  parameter int unsigned FRAME_BITS = 52
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  logic  valid,
  input  logic  uw,
  input  cplx_t data,
  output logic  sout
);
  logic [FRAME_BITS-1:0]          sh;
  logic [$clog2(FRAME_BITS)-1:0]  cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh   <= '0;
      cnt  <= '0;
      sout <= 1'b0;
    end else if (load) begin
      sout <= 1'b1;
      sh   <= {2'b10, valid, uw, data} << 1;
      cnt  <= 1;
    end else begin
      sout <= sh[FRAME_BITS-1];
      sh   <= sh << 1;
      if (cnt == $bits(cnt)'(FRAME_BITS - 1)) begin
        cnt <= '0;
        sh  <= {2'b10, 1'b0, 1'b0, 48'(0)};
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
