// channel_platform: complex baseband platform for spatial-temporal mobile
// radio channel simulation.
//
// Signal flow (one clock = one serial-link bit, 52 clocks per sample at
// 24 Msamples/s):
//   desired transmitter  -> link -> fading simulator (K_DES paths)
//        -> one link per path -> array response simulator -> element sums
//   interference transmitter -> link -> fading simulator (K_INT paths)
//        -> one link per path -> array response simulator -> element sums
//   element sums + Gaussian noise -> receiver filters -> N element outputs
// The element outputs feed the DSP frame buffer (frames for the DSP) and
// the systolic-array parameter estimator. The system controller receives
// channel and array control information over RS232C, sets attenuation,
// delay, Doppler, component-wave count, noise level and filter, and
// computes the array-response coefficients from the DOAs.
// Each link carries 48-bit I/Q samples with sampling and unique-word timing,
// and every receiving unit runs on the sample timing its link recovers,
// as separate hardware units joined by fiber would. The DSP and the
// control PCs are outside: their connections are ports.
//
// Timing: elem_valid pulses once per sample (every FRAME_BITS clocks);
// elem_uw marks the first sample of each frame at the element outputs.
module channel_platform
  import chsim_pkg::*;
#(
  parameter int unsigned FRAME_BITS   = 52,
  parameter int unsigned CLKS_PER_BIT = 10833,
  parameter int unsigned TX_FRAME_LEN = 320,
  parameter int unsigned TX_UW_LEN    = 31,
  parameter int unsigned SPS          = 4,
  parameter int unsigned P            = 23,
  parameter int unsigned UW_MAX       = 64,
  parameter int unsigned SLOT         = 72
) (
  input  logic        clk,
  input  logic        rst,
  // simulator control PC
  input  logic        uart_rxd,
  // element outputs
  output cplx_t       elem_out [N_ELEM],
  output logic        elem_valid,
  output logic        elem_uw,
  output logic        link_locked [2 + K0],
  // DSP: frame buffer
  input  logic        dsp_arm,
  output logic        dsp_done,
  input  logic [$clog2(TX_FRAME_LEN)-1:0] dsp_rd_sym,
  input  logic [$clog2(N_ELEM)-1:0]       dsp_rd_elem,
  output cplx_t       dsp_rd_data,
  // DSP / auxiliary PC: parameter estimator
  input  logic        est_trigger,
  input  logic        est_wr_en,
  input  logic [11:0] est_wr_addr,
  input  logic [31:0] est_wr_data,
  output logic        est_done,
  output logic        est_active,
  output ecplx_t      est_e,
  output logic        est_e_valid,
  input  logic [$clog2(P+1)-1:0] est_rd_row,
  input  logic [$clog2(P+1)-1:0] est_rd_col,
  output ecplx_t      est_rd_data
);
  localparam int unsigned N = N_ELEM;

  // ---------------- system controller ----------------
  logic        fade_en [2];
  logic        bpsk, fade_init, coef_busy;
  logic [31:0] fd_inc [2];
  logic [6:0]  delay  [K0];
  smp_t        atten  [K0];
  logic [4:0]  m_num  [K0];
  logic [15:0] theta0 [K0];
  cplx_t       coef   [K0][N];
  smp_t        noise_lvl [N];
  smp_t        fir_coef [8];

  sim_controller #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_ctrl (
    .clk, .rst, .rxd(uart_rxd), .fade_en, .bpsk, .fade_init, .fd_inc,
    .delay, .atten, .m_num, .theta0, .coef, .noise_lvl, .fir_coef, .coef_busy);

  // ---------------- transmitters and their links ----------------
  logic [$clog2(FRAME_BITS)-1:0] tcnt;
  logic  tx_ce, tx_ce_d;
  cplx_t tx_d [2];
  logic  tx_uw [2];
  logic  tx_sym_unused [2];
  logic  tx_ser [2];

  always_ff @(posedge clk) begin
    if (rst) begin
      tcnt    <= '0;
      tx_ce   <= 1'b0;
      tx_ce_d <= 1'b0;
    end else begin
      tcnt    <= (tcnt == ($bits(tcnt))'(FRAME_BITS - 1)) ? '0 : tcnt + 1'b1;
      tx_ce   <= (tcnt == ($bits(tcnt))'(FRAME_BITS - 1));
      tx_ce_d <= tx_ce;
    end
  end

  localparam logic [14:0] TX_SEED [2] = '{15'h1ACE, 15'h2B5D};
  localparam logic [4:0]  UW_SEED [2] = '{5'b00001, 5'b10110};
  for (genvar u = 0; u < 2; u++) begin : g_tx
    tx_source #(.FRAME_LEN(TX_FRAME_LEN), .UW_LEN(TX_UW_LEN), .SPS(SPS)) u_tx (
      .clk, .rst, .ce(tx_ce), .bpsk, .seed(TX_SEED[u]), .uw_seed(UW_SEED[u]),
      .dout(tx_d[u]), .uw(tx_uw[u]), .sym(tx_sym_unused[u]));
    link_serializer #(.FRAME_BITS(FRAME_BITS)) u_ser (
      .clk, .rst, .load(tx_ce_d), .valid(1'b1), .uw(tx_uw[u]), .data(tx_d[u]), .sout(tx_ser[u]));
  end

  // ---------------- fading simulators ----------------
  logic  fs_ce [2];
  logic  fs_uw_in [2];
  cplx_t fs_in [2];
  logic  fs_ce_d [2];
  logic  fs_uw_out [2];
  cplx_t path_d [K_DES];
  cplx_t path_i [K_INT];

  for (genvar u = 0; u < 2; u++) begin : g_rx_tx
    link_deserializer #(.FRAME_BITS(FRAME_BITS)) u_des (
      .clk, .rst, .sin(tx_ser[u]), .valid(fs_ce[u]), .uw(fs_uw_in[u]), .data(fs_in[u]),
      .locked(link_locked[u]));
    always_ff @(posedge clk) fs_ce_d[u] <= rst ? 1'b0 : fs_ce[u];
  end

  logic [6:0]  dly_d [K_DES], dly_i [K_INT];
  smp_t        att_d [K_DES], att_i [K_INT];
  logic [4:0]  m_d   [K_DES], m_i   [K_INT];
  logic [15:0] th_d  [K_DES], th_i  [K_INT];
  logic [31:0] sd_d  [K_DES], sd_i  [K_INT];
  for (genvar k = 0; k < K_DES; k++) begin : g_cfg_d
    assign dly_d[k] = delay[k];
    assign att_d[k] = atten[k];
    assign m_d[k]   = m_num[k];
    assign th_d[k]  = theta0[k];
    assign sd_d[k]  = 32'h1234_5679 + 32'(k) * 32'h9E37_79B9;
  end
  for (genvar k = 0; k < K_INT; k++) begin : g_cfg_i
    assign dly_i[k] = delay[K_DES + k];
    assign att_i[k] = atten[K_DES + k];
    assign m_i[k]   = m_num[K_DES + k];
    assign th_i[k]  = theta0[K_DES + k];
    assign sd_i[k]  = 32'h8765_4321 + 32'(k) * 32'h9E37_79B9;
  end

  fading_simulator #(.K(K_DES)) u_fs_d (
    .clk, .rst, .ce(fs_ce[0]), .din(fs_in[0]), .uw_in(fs_uw_in[0]), .init(fade_init),
    .fade_en(fade_en[0]), .fd_inc(fd_inc[0]), .delay(dly_d), .atten(att_d), .m_num(m_d),
    .theta0(th_d), .seed(sd_d), .path_out(path_d), .uw_out(fs_uw_out[0]));
  fading_simulator #(.K(K_INT)) u_fs_i (
    .clk, .rst, .ce(fs_ce[1]), .din(fs_in[1]), .uw_in(fs_uw_in[1]), .init(fade_init),
    .fade_en(fade_en[1]), .fd_inc(fd_inc[1]), .delay(dly_i), .atten(att_i), .m_num(m_i),
    .theta0(th_i), .seed(sd_i), .path_out(path_i), .uw_out(fs_uw_out[1]));

  // ---------------- per-path links ----------------
  logic  p_ser  [K0];
  logic  p_v    [K0];
  logic  p_uw   [K0];
  cplx_t p_data [K0];
  for (genvar k = 0; k < K0; k++) begin : g_plink
    localparam int unsigned U = (k < K_DES) ? 0 : 1;
    link_serializer #(.FRAME_BITS(FRAME_BITS)) u_ser (
      .clk, .rst, .load(fs_ce_d[U]), .valid(1'b1), .uw(fs_uw_out[U]),
      .data((k < K_DES) ? path_d[(k < K_DES) ? k : 0] : path_i[(k < K_DES) ? 0 : k - K_DES]),
      .sout(p_ser[k]));
    link_deserializer #(.FRAME_BITS(FRAME_BITS)) u_des (
      .clk, .rst, .sin(p_ser[k]), .valid(p_v[k]), .uw(p_uw[k]), .data(p_data[k]),
      .locked(link_locked[2 + k]));
  end

  // ---------------- array response simulators ----------------
  cplx_t pin_d [K_DES], pin_i [K_INT];
  cplx_t co_d [K_DES][N], co_i [K_INT][N];
  cplx_t ar_out [2][N];
  logic  ar_uw [2];
  for (genvar k = 0; k < K_DES; k++) begin : g_ar_d
    assign pin_d[k] = p_data[k];
    for (genvar n = 0; n < N; n++) begin : g_n
      assign co_d[k][n] = coef[k][n];
    end
  end
  for (genvar k = 0; k < K_INT; k++) begin : g_ar_i
    assign pin_i[k] = p_data[K_DES + k];
    for (genvar n = 0; n < N; n++) begin : g_n
      assign co_i[k][n] = coef[K_DES + k][n];
    end
  end

  array_response_sim #(.K(K_DES), .N(N)) u_ar_d (
    .clk, .rst, .ce(p_v[0]), .path_in(pin_d), .uw_in(p_uw[0]), .coef(co_d),
    .elem_out(ar_out[0]), .uw_out(ar_uw[0]));
  array_response_sim #(.K(K_INT), .N(N)) u_ar_i (
    .clk, .rst, .ce(p_v[K_DES]), .path_in(pin_i), .uw_in(p_uw[K_DES]), .coef(co_i),
    .elem_out(ar_out[1]), .uw_out(ar_uw[1]));

  // ---------------- element sums, noise, receiver filters ----------------
  logic ec_ce;
  logic ec_uw_unused;
  always_ff @(posedge clk) begin
    if (rst) begin
      ec_ce      <= 1'b0;
      elem_valid <= 1'b0;
    end else begin
      ec_ce      <= p_v[0];
      elem_valid <= ec_ce;
    end
  end
  assign ec_uw_unused = ar_uw[1];

  element_combiner #(.U(2), .N(N), .TAPS(8)) u_comb (
    .clk, .rst, .ce(ec_ce), .user_in(ar_out), .uw_in(ar_uw[0]), .noise_lvl, .fir_coef,
    .elem_out, .uw_out(elem_uw));

  // ---------------- DSP frame interface ----------------
  dsp_frame_buffer #(.N(N), .FRAME_LEN(TX_FRAME_LEN), .SPS(SPS)) u_fb (
    .clk, .rst, .ce(elem_valid), .elem_in(elem_out), .uw_in(elem_uw), .arm(dsp_arm),
    .done(dsp_done), .rd_sym(dsp_rd_sym), .rd_elem(dsp_rd_elem), .rd_data(dsp_rd_data));

  // ---------------- parameter estimator ----------------
  param_estimator #(.P(P), .N(N), .UW_MAX(UW_MAX), .SPS(SPS), .SLOT(SLOT)) u_est (
    .clk, .rst, .ce(elem_valid), .elem_in(elem_out), .uw_in(elem_uw),
    .wr_en(est_wr_en), .wr_addr(est_wr_addr), .wr_data(est_wr_data), .trigger(est_trigger),
    .done(est_done), .active(est_active), .e(est_e), .e_valid(est_e_valid),
    .rd_row(est_rd_row), .rd_col(est_rd_col), .rd_data(est_rd_data));
endmodule
