// timing_adjust: timing adjustment logic in front of the systolic array.
//
// The input logic presents all R rows of one input vector in the same
// slot. In the triangular array a vector must reach row i one slot later
// than row i-1, so row i passes through i slot-delay registers (row 0
// none, row R-1 R-1 of them), each advancing on `step`: the staircase of
// Ts delays of the timing adjustment logic.
//
// Timing: row i of a vector presented at step t leaves at step t+i.
// Row 0 has no delay register: its output is its input, unchanged.
module timing_adjust
  import chsim_pkg::*;
#(
  parameter int unsigned R = 24
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   step,
  input  ecplx_t din   [R],
  input  logic   vin   [R],
  output ecplx_t dout  [R],
  output logic   vout  [R]
);
  assign dout[0] = din[0];
  assign vout[0] = vin[0];

  for (genvar i = 1; i < R; i++) begin : g_row
    ecplx_t d [i];
    logic   v [i];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int j = 0; j < i; j++) begin
          d[j] <= '0;
          v[j] <= 1'b0;
        end
      end else if (step) begin
        d[0] <= din[i];
        v[0] <= vin[i];
        for (int j = 1; j < i; j++) begin
          d[j] <= d[j-1];
          v[j] <= v[j-1];
        end
      end
    end
    assign dout[i] = d[i-1];
    assign vout[i] = v[i-1];
  end
endmodule
