// estimator_input_logic: programmable input logic of the parameter estimator.
//
// Connects the simulator's element outputs and the unique word to the rows
// of the systolic array, in the configuration of the S/T-equalizer under
// test. Each of the P array rows has a source: 0 = nothing (a zero row is
// transparent in the array), 1 = antenna element `idx`, 2 = the unique word
// delayed by `idx` symbol periods Ts (time-domain taps). The reference row
// always carries the undelayed unique word, the desired response.
// Spatial-only equalizers use antenna rows only; equalizers with
// time-domain taps add delayed-unique-word rows.
//
// Because the array runs far below the sample rate, a trigger first
// captures the training part of one frame: from the next UW timing,
// uw_len symbols of all N elements (every SPS-th sample) go into a buffer.
// The buffered symbols are then issued one vector per array `step`, and
// after 2P+2 further steps (array drain) `done` pulses. The capture buffer
// and the row-source table are this design's choice.
//
// Timing: ce = sample strobe; step = array slot strobe; row outputs are
// registered on step.
// Samples enter with 20 fractional bits and leave with the array's 24, so
// the four lowest bits of each row output's real and imaginary part are
// always zero.
module estimator_input_logic
  import chsim_pkg::*;
#(
  parameter int unsigned P      = 23,
  parameter int unsigned N      = N_ELEM,
  parameter int unsigned UW_MAX = 64,
  parameter int unsigned SPS    = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   ce,
  input  cplx_t  elem_in [N],
  input  logic   uw_in,
  input  logic   trigger,
  input  logic   step,
  input  logic [1:0] row_kind [P],
  input  logic [4:0] row_idx  [P],
  input  logic [$clog2(UW_MAX+1)-1:0] uw_len,
  input  cplx_t  uw_ref  [UW_MAX],
  output ecplx_t row_out [P+1],
  output logic   row_valid [P+1],
  output logic   capturing,
  output logic   feeding,
  output logic   done
);
  localparam int unsigned SW = $clog2(UW_MAX+1);
  typedef enum logic [2:0] {IDLE, WAIT_UW, CAPTURE, FEED, DRAIN} st_t;

  st_t             st;
  cplx_t           buf_m [UW_MAX][N];
  logic [SW-1:0]   sym;
  logic [$clog2(SPS+1)-1:0] ph;
  logic [7:0]      dcnt;
  logic [SW-1:0]   ulen;

  function automatic ecplx_t widen(input cplx_t v);
    ecplx_t w;
    w.re = ew_t'(v.re) <<< (EFRAC - FRAC);
    w.im = ew_t'(v.im) <<< (EFRAC - FRAC);
    return w;
  endfunction

  assign ulen = (uw_len == 0) ? SW'(1) : (uw_len > SW'(UW_MAX)) ? SW'(UW_MAX) : uw_len;
  assign capturing = (st == WAIT_UW) || (st == CAPTURE);
  assign feeding   = (st == FEED);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      st   <= IDLE;
      sym  <= '0;
      ph   <= '0;
      dcnt <= '0;
      for (int i = 0; i <= P; i++) begin
        row_out[i]   <= '0;
        row_valid[i] <= 1'b0;
      end
    end else begin
      unique case (st)
        IDLE: if (trigger) st <= WAIT_UW;
        WAIT_UW: if (ce && uw_in) begin
          for (int n = 0; n < N; n++) buf_m[0][n] <= elem_in[n];
          sym <= SW'(1);
          ph  <= (SPS == 1) ? '0 : ($bits(ph))'(1);
          st  <= (ulen == SW'(1)) ? FEED : CAPTURE;
        end
        CAPTURE: if (ce) begin
          ph <= (ph == ($bits(ph))'(SPS - 1)) ? '0 : ph + 1'b1;
          if (ph == 0) begin
            for (int n = 0; n < N; n++) buf_m[sym[$clog2(UW_MAX)-1:0]][n] <= elem_in[n];
            if (sym == ulen - 1'b1) begin
              st  <= FEED;
              sym <= '0;
            end else sym <= sym + 1'b1;
          end
        end
        FEED: if (step) begin
          for (int i = 0; i < P; i++) begin
            row_valid[i] <= 1'b1;
            unique case (row_kind[i])
              2'd1:    row_out[i] <= widen(buf_m[sym[$clog2(UW_MAX)-1:0]][row_idx[i][$clog2(N)-1:0]]);
              2'd2:    row_out[i] <= (sym >= SW'(row_idx[i])) ?
                                     widen(uw_ref[($clog2(UW_MAX))'(sym - SW'(row_idx[i]))]) : '0;
              default: row_out[i] <= '0;
            endcase
          end
          row_valid[P] <= 1'b1;
          row_out[P]   <= widen(uw_ref[sym[$clog2(UW_MAX)-1:0]]);
          if (sym == ulen - 1'b1) begin
            st   <= DRAIN;
            dcnt <= '0;
          end else sym <= sym + 1'b1;
        end
        DRAIN: if (step) begin
          for (int i = 0; i <= P; i++) row_valid[i] <= 1'b0;
          if (dcnt == 8'(2 * P + 1)) begin
            st   <= IDLE;
            done <= 1'b1;
          end else dcnt <= dcnt + 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
