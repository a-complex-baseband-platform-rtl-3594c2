// sim_controller: system controller of the fading/array response simulator.
//
// Receives channel and array control information from the control PC over
// RS232C and holds it in registers. Command format (this design's choice):
// six bytes, 0xA5, register address, then a 32-bit value MSB first.
// Register map:
//   0x00 control: [0] fading on (desired), [1] fading on (interferer),
//        [2] circular array, [7:4] number of elements, [8] BPSK transmitters
//   0x01 apply: any write restarts the fading generators and recomputes
//        the array-response coefficients from the DOAs
//   0x10+k attenuation of path k (20 fractional bits)
//   0x18+k delay of path k in samples
//   0x20+k DOA of path k (16-bit fraction of a turn)
//   0x28+k [4:0] number of component waves, [31:16] Theta_0 of path k
//   0x30+u maximum Doppler frequency of user u as f_D/f_s*2^32
//   0x38+n noise level of element n;  0x40+t receiver filter tap t
// Paths 0..K_D-1 belong to the desired user, K_D..K_D+K_I-1 to the
// interferer. Reset values: all paths attenuation 1, delay 0, DOA 0,
// 8 component waves, fading off, linear 8-element array, no noise,
// pass-through filter, and one coefficient pass is run after reset.
//
// Timing: a register changes two clocks after the stop bit of its last
// byte; coefficients are rewritten one per clock during a pass.
module sim_controller
  import chsim_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 10833,
  parameter int unsigned K_D  = K_DES,
  parameter int unsigned K_I  = K_INT,
  parameter int unsigned N    = N_ELEM,
  parameter int unsigned TAPS = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rxd,
  output logic        fade_en  [2],
  output logic        bpsk,
  output logic        fade_init,
  output logic [31:0] fd_inc   [2],
  output logic [6:0]  delay    [K_D+K_I],
  output smp_t        atten    [K_D+K_I],
  output logic [4:0]  m_num    [K_D+K_I],
  output logic [15:0] theta0   [K_D+K_I],
  output cplx_t       coef     [K_D+K_I][N],
  output smp_t        noise_lvl [N],
  output smp_t        fir_coef [TAPS],
  output logic        coef_busy
);
  localparam int unsigned NP = K_D + K_I;

  logic       rx_v;
  logic [7:0] rx_b;
  logic [2:0] nb;
  logic [7:0] addr;
  logic [31:0] val;
  logic        wr;
  logic        circular;
  logic [3:0]  n_elem;
  logic [15:0] doa [NP];
  logic        calc_start, init_done;
  logic        c_wr;
  logic [$clog2(NP+1)-1:0] c_p;
  logic [$clog2(N+1)-1:0]  c_n;
  cplx_t       c_v;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (.clk, .rst, .rxd, .valid(rx_v), .data(rx_b));

  // byte assembler
  always_ff @(posedge clk) begin
    wr <= 1'b0;
    if (rst) begin
      nb   <= '0;
      addr <= '0;
      val  <= '0;
    end else if (rx_v) begin
      if (nb == 0) begin
        if (rx_b == 8'hA5) nb <= 3'd1;
      end else if (nb == 1) begin
        addr <= rx_b;
        nb   <= 3'd2;
      end else begin
        val <= {val[23:0], rx_b};
        if (nb == 5) begin
          nb <= '0;
          wr <= 1'b1;
        end else nb <= nb + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    fade_init  <= 1'b0;
    calc_start <= 1'b0;
    if (rst) begin
      fade_en[0] <= 1'b0;
      fade_en[1] <= 1'b0;
      bpsk       <= 1'b0;
      circular   <= 1'b0;
      n_elem     <= 4'(N);
      init_done  <= 1'b0;
      fd_inc[0]  <= 32'd357914;    // 2000 Hz at 24 MHz
      fd_inc[1]  <= 32'd357914;
      for (int k = 0; k < NP; k++) begin
        atten[k]  <= ONE;
        delay[k]  <= '0;
        doa[k]    <= '0;
        m_num[k]  <= 5'd8;
        theta0[k] <= 16'(k * 4099);
      end
      for (int n = 0; n < N; n++) noise_lvl[n] <= '0;
      for (int t = 0; t < TAPS; t++) fir_coef[t] <= (t == 0) ? ONE : '0;
    end else begin
      if (!init_done) begin
        init_done  <= 1'b1;
        calc_start <= 1'b1;
        fade_init  <= 1'b1;
      end
      if (wr) begin
        if (addr == 8'h00) begin
          fade_en[0] <= val[0];
          fade_en[1] <= val[1];
          circular   <= val[2];
          n_elem     <= val[7:4];
          bpsk       <= val[8];
        end
        if (addr == 8'h01) begin
          fade_init  <= 1'b1;
          calc_start <= 1'b1;
        end
        for (int k = 0; k < NP; k++) begin
          if (addr == 8'(8'h10 + k)) atten[k] <= smp_t'(val);
          if (addr == 8'(8'h18 + k)) delay[k] <= val[6:0];
          if (addr == 8'(8'h20 + k)) doa[k]   <= val[15:0];
          if (addr == 8'(8'h28 + k)) begin
            m_num[k]  <= val[4:0];
            theta0[k] <= val[31:16];
          end
        end
        for (int u = 0; u < 2; u++) if (addr == 8'(8'h30 + u)) fd_inc[u] <= val;
        for (int n = 0; n < N; n++) if (addr == 8'(8'h38 + n)) noise_lvl[n] <= smp_t'(val);
        for (int t = 0; t < TAPS; t++) if (addr == 8'(8'h40 + t)) fir_coef[t] <= smp_t'(val);
      end
    end
  end

  array_coef_calc #(.NP(NP), .N(N)) u_calc (
    .clk, .rst, .start(calc_start), .circular, .n_elem, .doa,
    .busy(coef_busy), .wr_en(c_wr), .wr_path(c_p), .wr_elem(c_n), .wr_coef(c_v));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NP; k++) for (int n = 0; n < N; n++) coef[k][n] <= '0;
    end else if (c_wr) begin
      coef[c_p][c_n] <= c_v;
    end
  end
endmodule
