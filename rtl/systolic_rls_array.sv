// systolic_rls_array: triangular QR-RLS systolic array for P parameters.
//
// Row i (0-based, i < P) carries input element i from the left through i
// internal cells into boundary cell (i,i). Row P carries the desired
// response (the unique word) through P internal cells into the final cell.
// Each boundary cell sends its rotation (c, s) down its column; data move
// right along rows; the cosine product gamma moves down the diagonal,
// two slots per boundary cell (the cell's own output register plus one
// delay register), which matches the one-slot-per-row skew of the inputs.
// After a vector has passed, the cells hold R (triangle) and u (row P) with
// R w = u for the exponentially weighted least-squares weights w, and the
// final cell gives the a-posteriori error of the current vector.
// The size P = 23 is the estimator board's capacity.
//
// Interface: inputs x_in[0..P] must be skewed (row i one step later than
// row i-1, see timing_adjust). All cells advance on `step`; steps must be
// more than 67 clocks apart (boundary-cell computation). `rd_row`,
// `rd_col` read a cell's stored value combinationally: (i, j) with j < i
// or i = P gives an internal cell, (i, i) a boundary cell (real).
// Timing: the error of a vector whose row 0 entered at step t leaves at
// step t + 2P + 1 (e_valid then high).
module systolic_rls_array
  import chsim_pkg::*;
#(
  parameter int unsigned P = 23
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   clr,
  input  logic   step,
  input  ew_t    beta,
  input  ecplx_t x_in   [P+1],
  input  logic   x_valid [P+1],
  output ecplx_t e,
  output logic   e_valid,
  input  logic [$clog2(P+1)-1:0] rd_row,
  input  logic [$clog2(P+1)-1:0] rd_col,
  output ecplx_t rd_data,
  output logic   busy
);
  // horizontal data into cell (i,j) from the left; column j = P is the exit
  ecplx_t xh  [P+1][P+1];
  logic   xhv [P+1][P+1];
  // rotation into cell (i,j) from above (for i > j) or out of boundary (j,j) at i=j
  ew_t    cv  [P+1][P];
  ecplx_t sv  [P+1][P];
  logic   csv [P+1][P];
  ecplx_t rcell [P+1][P];
  ew_t    g_bc  [P];     // gamma out of boundary cell j
  ew_t    g_d   [P];     // delayed gamma, into boundary j+1 / final cell
  logic   bbusy [P];

  for (genvar i = 0; i <= P; i++) begin : g_row
    assign xh[i][0]  = x_in[i];
    assign xhv[i][0] = x_valid[i];
    for (genvar j = 0; j < P; j++) begin : g_col
      if (j < i) begin : g_int
        qr_internal_cell u_ic (
          .clk, .rst, .clr, .step, .beta,
          .x_in(xh[i][j]), .x_valid(xhv[i][j]),
          .c_in(cv[i-1][j]), .s_in(sv[i-1][j]), .cs_valid_in(csv[i-1][j]),
          .x_out(xh[i][j+1]), .x_valid_out(xhv[i][j+1]),
          .c_out(cv[i][j]), .s_out(sv[i][j]), .cs_valid_out(csv[i][j]),
          .r(rcell[i][j]));
      end else if (j == i) begin : g_bnd
        ew_t rb;
        qr_boundary_cell u_bc (
          .clk, .rst, .clr, .step, .beta,
          .x_in(xh[i][j]), .x_valid(xhv[i][j]),
          .gamma_in((j == 0) ? EONE : g_d[(j == 0) ? 0 : j-1]),
          .c_out(cv[i][j]), .s_out(sv[i][j]), .cs_valid(csv[i][j]),
          .gamma_out(g_bc[j]), .r(rb), .busy(bbusy[j]));
        assign rcell[i][j] = '{re: rb, im: '0};
        always_ff @(posedge clk) begin
          if (rst || clr) g_d[j] <= EONE;
          else if (step)  g_d[j] <= g_bc[j];
        end
      end else begin : g_none
        assign rcell[i][j] = '0;
        assign cv[i][j]    = '0;
        assign sv[i][j]    = '0;
        assign csv[i][j]   = 1'b0;
      end
    end
    if (i < P) begin : g_pad
      for (genvar j = i + 1; j <= P; j++) begin : g_nx
        assign xh[i][j]  = '0;
        assign xhv[i][j] = 1'b0;
      end
    end
  end

  qr_final_cell u_fc (
    .clk, .rst, .step, .alpha(xh[P][P]), .alpha_valid(xhv[P][P]),
    .gamma_in(g_d[P-1]), .e, .e_valid);

  assign rd_data = rcell[rd_row][(rd_col >= ($bits(rd_col))'(P)) ? '0 : rd_col];

  always_comb begin
    busy = 1'b0;
    for (int j = 0; j < P; j++) busy |= bbusy[j];
  end
endmodule
