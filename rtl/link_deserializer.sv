// link_deserializer: serial-to-parallel side of a fiber link between units.
//
// Receives the 52-bit frames of link_serializer on the (recovered) bit clock.
// Frame alignment: every FRAME_BITS bits the two oldest bits of the shift
// register are checked for the "10" header. While hunting, a failed check
// slips the frame boundary by one bit; LOCK_N consecutive good headers give
// lock. In lock, LOSS_N consecutive bad headers drop back to hunting.
// Alignment by header and bit slip is this design's choice; the link only
// has to return the 48 data bits and the sampling and UW timing.
//
// Timing: when a frame whose sampling-timing bit is set is complete and the
// receiver is locked, `valid` pulses for one clock with `data` and `uw`
// (which hold until the next frame). `valid` is the sample strobe of the
// receiving unit. Latency from the first header bit at `sin` to `valid` is
// FRAME_BITS+1 clocks.
module link_deserializer
  import chsim_pkg::*;
#(
  parameter int unsigned FRAME_BITS = 52,
  parameter int unsigned LOCK_N     = 8,
  parameter int unsigned LOSS_N     = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  sin,
  output logic  valid,
  output logic  uw,
  output cplx_t data,
  output logic  locked
);
  logic [FRAME_BITS-1:0]          sr;
  logic [$clog2(FRAME_BITS)-1:0]  pos;
  logic [$clog2(LOCK_N+1)-1:0]    good;
  logic [$clog2(LOSS_N+1)-1:0]    bad;
  logic                           hdr_ok;

  assign hdr_ok = (sr[FRAME_BITS-1 -: 2] == 2'b10);

  always_ff @(posedge clk) begin
    if (rst) begin
      sr     <= '0;
      pos    <= '0;
      good   <= '0;
      bad    <= '0;
      locked <= 1'b0;
      valid  <= 1'b0;
      uw     <= 1'b0;
      data   <= '0;
    end else begin
      sr    <= {sr[FRAME_BITS-2:0], sin};
      valid <= 1'b0;
      pos   <= (pos == $bits(pos)'(FRAME_BITS - 1)) ? '0 : pos + 1'b1;
      if (pos == $bits(pos)'(FRAME_BITS - 1)) begin
        if (!locked) begin
          if (hdr_ok) begin
            if (good == $bits(good)'(LOCK_N - 1)) begin
              locked <= 1'b1;
              good   <= '0;
            end else begin
              good <= good + 1'b1;
            end
          end else begin
            good <= '0;
            pos  <= pos;          // slip one bit
          end
        end else if (hdr_ok) begin
          bad   <= '0;
          valid <= sr[FRAME_BITS-3];
          uw    <= sr[FRAME_BITS-4];
          data  <= sr[47:0];
        end else if (bad == $bits(bad)'(LOSS_N - 1)) begin
          locked <= 1'b0;
          bad    <= '0;
        end else begin
          bad <= bad + 1'b1;
        end
      end
    end
  end
endmodule
