// param_estimator: the systolic-array parameter estimator board.
//
// Estimates up to P = 23 S/T-equalizer weights by the RLS algorithm on a
// QR systolic array, as an adjunct to the DSP. The auxiliary control PC
// configures it over a simple register port: the forgetting factor lambda,
// the unique-word length and waveform, and the input-logic row sources.
// The DSP triggers an estimation; the board then captures the unique-word
// part of the next frame, runs it through the array, and signals `done`
// while the DSP continues with other work. The weights follow from the
// cell contents (R w = u) read through rd_row/rd_col; the a-posteriori
// error of each training symbol is streamed on e/e_valid.
// Register map (this design's choice), wr_addr / wr_data:
//   0x000 lambda, 24 fractional bits (the array uses beta = sqrt(lambda),
//         computed here when lambda is written)
//   0x001 unique-word length in symbols (1..UW_MAX)
//   0x1ii row ii source: [1:0] kind (0 none, 1 antenna, 2 delayed UW),
//         [12:8] antenna index or delay in symbols
//   0x2ss unique-word symbol ss, I part; 0x3ss Q part (20 fractional bits)
// Each trigger clears the array first, so every frame's training is an
// independent estimate.
//
// Timing: `step` is generated every SLOT clocks (>= 68, the boundary cell's
// computation). One training symbol enters per slot; an estimation takes
// the capture time plus (uw_len + 2P + 2) slots.
module param_estimator
  import chsim_pkg::*;
#(
  parameter int unsigned P      = 23,
  parameter int unsigned N      = N_ELEM,
  parameter int unsigned UW_MAX = 64,
  parameter int unsigned SPS    = 4,
  parameter int unsigned SLOT   = 72
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  cplx_t       elem_in [N],
  input  logic        uw_in,
  input  logic        wr_en,
  input  logic [11:0] wr_addr,
  input  logic [31:0] wr_data,
  input  logic        trigger,
  output logic        done,
  output logic        active,
  output ecplx_t      e,
  output logic        e_valid,
  input  logic [$clog2(P+1)-1:0] rd_row,
  input  logic [$clog2(P+1)-1:0] rd_col,
  output ecplx_t      rd_data
);
  localparam int unsigned SW = $clog2(UW_MAX+1);

  ew_t         beta;
  logic [SW-1:0] uw_len;
  logic [1:0]  row_kind [P];
  logic [4:0]  row_idx  [P];
  cplx_t       uw_ref   [UW_MAX];
  logic [$clog2(SLOT)-1:0] scnt;
  logic        step, clr, arr_busy, cap, feed;
  ecplx_t      rows  [P+1];
  logic        rv    [P+1];
  ecplx_t      rows_s [P+1];
  logic        rv_s  [P+1];

  // integer square root, used once per lambda write
  function automatic logic [31:0] isqrt(input logic [63:0] v);
    logic [35:0] rem, trial;
    logic [31:0] q;
    rem = '0;
    q   = '0;
    for (int i = 31; i >= 0; i--) begin
      rem   = {rem[33:0], v[2*i+1 -: 2]};
      trial = {2'b00, q, 2'b01};
      if (rem >= trial) begin
        rem = rem - trial;
        q   = {q[30:0], 1'b1};
      end else begin
        q = {q[30:0], 1'b0};
      end
    end
    return q;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      beta   <= ew_t'(isqrt(64'(32'd15099494) << EFRAC));   // lambda = 0.9
      uw_len <= SW'(31);
      for (int i = 0; i < P; i++) begin
        row_kind[i] <= (i < N) ? 2'd1 : 2'd0;
        row_idx[i]  <= 5'(i);
      end
      for (int s = 0; s < UW_MAX; s++) uw_ref[s] <= '0;
    end else if (wr_en) begin
      if (wr_addr == 12'h000) beta <= ew_t'(isqrt(64'(wr_data) << EFRAC));
      if (wr_addr == 12'h001) uw_len <= SW'(wr_data);
      for (int i = 0; i < P; i++) if (wr_addr == 12'(12'h100 + i)) begin
        row_kind[i] <= wr_data[1:0];
        row_idx[i]  <= wr_data[12:8];
      end
      for (int s = 0; s < UW_MAX; s++) begin
        if (wr_addr == 12'(12'h200 + s)) uw_ref[s].re <= smp_t'(wr_data);
        if (wr_addr == 12'(12'h300 + s)) uw_ref[s].im <= smp_t'(wr_data);
      end
    end
  end

  // slot strobe
  always_ff @(posedge clk) begin
    if (rst) begin
      scnt <= '0;
      step <= 1'b0;
      clr  <= 1'b0;
    end else begin
      clr  <= trigger && !active;
      step <= (scnt == ($bits(scnt))'(SLOT - 1));
      scnt <= (scnt == ($bits(scnt))'(SLOT - 1)) ? '0 : scnt + 1'b1;
    end
  end

  estimator_input_logic #(.P(P), .N(N), .UW_MAX(UW_MAX), .SPS(SPS)) u_in (
    .clk, .rst, .ce, .elem_in, .uw_in, .trigger(trigger && !active), .step,
    .row_kind, .row_idx, .uw_len, .uw_ref,
    .row_out(rows), .row_valid(rv), .capturing(cap), .feeding(feed), .done);

  timing_adjust #(.R(P+1)) u_skew (
    .clk, .rst, .step, .din(rows), .vin(rv), .dout(rows_s), .vout(rv_s));

  systolic_rls_array #(.P(P)) u_arr (
    .clk, .rst, .clr, .step, .beta, .x_in(rows_s), .x_valid(rv_s),
    .e, .e_valid, .rd_row, .rd_col, .rd_data, .busy(arr_busy));

  logic draining;
  always_ff @(posedge clk) begin
    if (rst || done) draining <= 1'b0;
    else if (feed)   draining <= 1'b1;
  end
  assign active = cap || feed || draining || arr_busy;

  // a slot must be long enough for the boundary cells
  a_slot: assert property (@(posedge clk) disable iff (rst) step |-> !arr_busy);
endmodule
