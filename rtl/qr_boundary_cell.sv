// qr_boundary_cell: boundary (diagonal) cell of the QR-RLS systolic array.
//
// Holds one real diagonal element r of the triangular factor. For each
// complex input x it computes the Givens rotation that annihilates x
// against the forgetting-factor-scaled r:
//   r' = sqrt((beta*r)^2 + |x|^2),  c = beta*r / r',  s = x / r',  r <- r'
// (c = 1, s = 0 when r' = 0), sends (c, s) to the internal cells of its
// column and passes gamma_out = c * gamma_in down the diagonal (the product
// of cosines that the final cell needs). The cell functions follow the
// standard Givens-rotation QR-RLS array; the arithmetic (32-bit, 24
// fractional bits) and the sequential square root and division are this
// design's choice.
//
// Timing: inputs are taken on `step` when x_valid is set. A bit-serial
// square root (32 clocks) then three parallel restoring divisions (32
// clocks) follow; results appear on the registered outputs BUSY_CYCLES
// clocks after step, so the slot between steps must be longer than that.
// On a step with x_valid clear, cs_valid drops and nothing else changes.
// `clr` empties the cell (r = 0).
module qr_boundary_cell
  import chsim_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   clr,
  input  logic   step,
  input  ew_t    beta,
  input  ecplx_t x_in,
  input  logic   x_valid,
  input  ew_t    gamma_in,
  output ew_t    c_out,
  output ecplx_t s_out,
  output logic   cs_valid,
  output ew_t    gamma_out,
  output ew_t    r,
  output logic   busy
);
  localparam int unsigned BUSY_CYCLES = 67;

  typedef enum logic [1:0] {IDLE, SQRT, DIV, DONE} st_t;
  st_t          st;
  logic [5:0]   it;
  ecplx_t       x;
  ew_t          g;
  logic [31:0]  bx;           // beta*r, non-negative
  logic [63:0]  rad;          // (beta r)^2 + |x|^2, 48 fractional bits
  logic [34:0]  srem;
  logic [31:0]  root;
  logic [31:0]  num [3];      // |bx|, |x.re|, |x.im|
  logic [32:0]  rem [3];
  logic [31:0]  quo [3];
  logic         neg_re, neg_im;
  logic [35:0]  trial;

  function automatic logic [31:0] mag(input ew_t v);
    return v[31] ? 32'(-v) : 32'(v);
  endfunction

  assign trial = {2'b00, root, 2'b01};

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      st        <= IDLE;
      r         <= '0;
      c_out     <= EONE;
      s_out     <= '0;
      cs_valid  <= 1'b0;
      gamma_out <= EONE;
      it        <= '0;
      x         <= '0;
      g         <= '0;
      bx        <= '0;
      rad       <= '0;
      srem      <= '0;
      root      <= '0;
      neg_re    <= 1'b0;
      neg_im    <= 1'b0;
      for (int i = 0; i < 3; i++) begin
        num[i] <= '0;
        rem[i] <= '0;
        quo[i] <= '0;
      end
    end else begin
      unique case (st)
        IDLE: if (step) begin
          cs_valid <= 1'b0;
          if (x_valid) begin
            logic [31:0] b;
            b    = mag(emul(beta, r));
            x   <= x_in;
            g   <= gamma_in;
            bx  <= b;
            rad <= 64'(b) * 64'(b) + 64'(mag(x_in.re)) * 64'(mag(x_in.re))
                 + 64'(mag(x_in.im)) * 64'(mag(x_in.im));
            srem <= '0;
            root <= '0;
            it   <= 6'd31;
            st   <= SQRT;
          end
        end
        SQRT: begin
          // one result bit per clock: bring down two radicand bits
          logic [35:0] rm;
          rm = {srem[33:0], rad[2*it+1 -: 2]};
          if (rm >= trial) begin
            srem <= 35'(rm - trial);
            root <= {root[30:0], 1'b1};
          end else begin
            srem <= 35'(rm);
            root <= {root[30:0], 1'b0};
          end
          if (it == 0) begin
            st     <= DIV;
            it     <= 6'd31;
            num[0] <= bx;
            num[1] <= mag(x.re);
            num[2] <= mag(x.im);
            rem[0] <= 33'(bx >> 8);
            rem[1] <= 33'(mag(x.re) >> 8);
            rem[2] <= 33'(mag(x.im) >> 8);
            neg_re <= x.re[31];
            neg_im <= x.im[31];
          end else it <= it - 1'b1;
        end
        DIV: begin
          // quotient bit it of (num << 24) / root, for the three numerators
          for (int i = 0; i < 3; i++) begin
            logic [32:0] rm;
            rm = {rem[i][31:0], (it >= 24) ? num[i][5'(it - 24)] : 1'b0};
            if (root != 0 && rm >= {1'b0, root}) begin
              rem[i]     <= rm - {1'b0, root};
              quo[i][5'(it)] <= 1'b1;
            end else begin
              rem[i]     <= rm;
              quo[i][5'(it)] <= 1'b0;
            end
          end
          if (it == 0) st <= DONE;
          else it <= it - 1'b1;
        end
        DONE: begin
          st       <= IDLE;
          r        <= ew_t'(root);
          cs_valid <= 1'b1;
          if (root == 0) begin
            c_out     <= EONE;
            s_out     <= '0;
            gamma_out <= g;
          end else begin
            c_out     <= ew_t'(quo[0]);
            s_out.re  <= neg_re ? -ew_t'(quo[1]) : ew_t'(quo[1]);
            s_out.im  <= neg_im ? -ew_t'(quo[2]) : ew_t'(quo[2]);
            gamma_out <= emul(ew_t'(quo[0]), g);
          end
        end
      endcase
    end
  end

  assign busy = (st != IDLE);
endmodule
