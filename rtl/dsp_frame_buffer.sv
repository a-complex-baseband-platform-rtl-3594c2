// dsp_frame_buffer: frame capture between the simulator and the DSP.
//
// The DSP cannot keep up with 24 Msamples/s, so whole received frames are
// handed over periodically. When armed, the buffer waits for the UW timing,
// then stores FRAME_LEN symbols of all N element outputs, one sample per
// symbol (every SPS-th sample, starting at the UW sample), and raises
// `done`. The DSP then reads the frame word by word (rd_sym, rd_elem) and
// re-arms for the next frame. Frame length 320 symbols follows the
// experiment; one sample per symbol and the read port are this design's
// choice.
//
// Timing: samples are taken on ce; `rd_data` is registered (one clock).
module dsp_frame_buffer
  import chsim_pkg::*;
#(
  parameter int unsigned N         = N_ELEM,
  parameter int unsigned FRAME_LEN = 320,
  parameter int unsigned SPS       = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  cplx_t elem_in [N],
  input  logic  uw_in,
  input  logic  arm,
  output logic  done,
  input  logic [$clog2(FRAME_LEN)-1:0] rd_sym,
  input  logic [$clog2(N)-1:0]         rd_elem,
  output cplx_t rd_data
);
  cplx_t                           mem [FRAME_LEN][N];
  logic                            armed, cap;
  logic [$clog2(FRAME_LEN)-1:0]    sym;
  logic [$clog2(SPS+1)-1:0]        ph;

  logic start, take;
  assign start = ce && armed && uw_in;             // first symbol of the frame
  assign take  = start || (ce && cap && ph == 0);  // symbol instants

  always_ff @(posedge clk) begin
    if (rst) begin
      armed <= 1'b0;
      cap   <= 1'b0;
      done  <= 1'b0;
      sym   <= '0;
      ph    <= '0;
    end else begin
      if (arm) begin
        armed <= 1'b1;
        done  <= 1'b0;
      end
      if (take) begin
        for (int n = 0; n < N; n++) mem[start ? '0 : sym][n] <= elem_in[n];
        if (!start && sym == ($bits(sym))'(FRAME_LEN - 1)) begin
          cap  <= 1'b0;
          done <= 1'b1;
        end else begin
          sym <= start ? ($bits(sym))'(1) : sym + 1'b1;
        end
      end
      if (start) begin
        armed <= 1'b0;
        cap   <= 1'b1;
      end
      if (ce && (start || cap)) begin
        if (start) ph <= (SPS == 1) ? '0 : ($bits(ph))'(1);
        else       ph <= (ph == ($bits(ph))'(SPS - 1)) ? '0 : ph + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) rd_data <= mem[rd_sym][rd_elem];
endmodule
