// tx_source: baseband transmitter of one user (desired or interferer).
//
// Produces framed PN-modulated complex baseband samples. Each frame is
// FRAME_LEN symbols: the first UW_LEN symbols are the unique word (the
// 31-chip m-sequence of x^5+x^2+1, sent as (1+j)/sqrt2 or -(1+j)/sqrt2,
// starting from state `uw_seed`, so that users can send different shifts),
// the rest are data symbols from a 15-bit PN generator (x^15+x^14+1)
// seeded by `seed`. QPSK maps two PN bits to (+-1 +-j)/sqrt2; BPSK (bpsk=1)
// maps one bit to +-1. Each symbol is held for SPS samples (rectangular
// pulse); the receive filter of the simulator shapes the spectrum.
// Defaults (320-symbol frame, 31-symbol unique word, 4 samples/symbol, i.e.
// 6 Msymbols/s at 24 Msamples/s) are the experiment conditions; the PN
// polynomials, mapping and pulse shape are this design's choice.
//
// Timing: one sample per clock where ce=1. `dout`, `uw` (high on the first
// sample of each frame) and `sym` (high on the first sample of each symbol)
// change one clock after the ce that produces them.
module tx_source
  import chsim_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 320,
  parameter int unsigned UW_LEN    = 31,
  parameter int unsigned SPS       = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        bpsk,
  input  logic [14:0] seed,
  input  logic [4:0]  uw_seed,
  output cplx_t       dout,
  output logic        uw,
  output logic        sym
);
  localparam smp_t A = smp_t'($rtoi(0.7071067811865476 * (2.0 ** FRAC)));

  logic [$clog2(SPS+1)-1:0]       sc;
  logic [$clog2(FRAME_LEN+1)-1:0] symc;
  logic [4:0]                     uw_lfsr;
  logic [14:0]                    pn;
  logic                           b0, b1;

  assign b0 = pn[14];
  assign b1 = pn[13];

  always_ff @(posedge clk) begin
    if (rst) begin
      sc      <= '0;
      symc    <= '0;
      uw_lfsr <= (uw_seed == '0) ? 5'b00001 : uw_seed;
      pn      <= (seed == '0) ? 15'h1 : seed;
      dout    <= '0;
      uw      <= 1'b0;
      sym     <= 1'b0;
    end else if (ce) begin
      sym <= (sc == 0);
      uw  <= (sc == 0) && (symc == 0);
      if (sc == 0) begin
        if (symc < $bits(symc)'(UW_LEN)) begin
          dout.re <= uw_lfsr[0] ? -A : A;
          dout.im <= uw_lfsr[0] ? -A : A;
          uw_lfsr <= {uw_lfsr[0] ^ uw_lfsr[3], uw_lfsr[4:1]};
        end else if (bpsk) begin
          dout.re <= b0 ? -ONE : ONE;
          dout.im <= '0;
          pn      <= {pn[13:0], pn[14] ^ pn[13]};
        end else begin
          dout.re <= b0 ? -A : A;
          dout.im <= b1 ? -A : A;
          pn      <= {pn[12:0], pn[14] ^ pn[13], pn[13] ^ pn[12]};
        end
        if (symc == $bits(symc)'(FRAME_LEN - 1)) begin
          symc    <= '0;
          uw_lfsr <= (uw_seed == '0) ? 5'b00001 : uw_seed;
        end else begin
          symc <= symc + 1'b1;
        end
      end
      sc <= (sc == $bits(sc)'(SPS - 1)) ? '0 : sc + 1'b1;
    end
  end
endmodule
