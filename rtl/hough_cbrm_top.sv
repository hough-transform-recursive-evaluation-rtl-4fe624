// hough_cbrm_top: line Hough transform of an edge-pixel stream, with the
// trigonometry replaced by the crossed CBRM recursion evaluated in
// distributed arithmetic.
//
// Edge pixels (x, y) enter on a valid/ready handshake (pix_*). For every pixel
// the sequencer loads the coordinates into the cbrm_pair, which produces
// rho(theta_i) and rho(theta_i + pi/2) for i = 0 .. N_THETA/2-1 by repeated
// Convolution-LUT lookups (no multiplier, no sine table). Each iteration casts
// two votes into the accumulator. After the last pixel (ht_idle high, no
// pixel offered) a pulse on peak_start scans the grid for the most voted
// (theta, rho) cell. The coefficients alpha = cos(pi/N_THETA) and
// beta = sin(pi/N_THETA) exist only in two Convolution-LUTs, (alpha, beta)
// for the rho_I units and (alpha, -beta) for the rho_II units. With M > 1,
// M engines (sequencer, pair and a private grid each) share the pixel stream
// and read the same two multi-port tables: a pixel goes to the lowest-numbered
// engine that is ready, and every read of the grid returns the sum over the
// engines' grids (saturating at the counter maximum), so the result is the
// same as with one engine, about M times sooner.
// The grid is cleared automatically after reset and on
// clear_start (clear_busy high meanwhile; do not send pixels then). The
// rd_* port reads any cell (one cycle latency) while the peak finder is idle.
//
// Angles: theta = t * pi / N_THETA, t = 0 .. N_THETA-1. Rho: grid index
// r = round(rho) + RHO_OFS, r = 0 .. NRHO-1, unit step, rho measured from the
// pixel origin (0, 0).
// Throughput: one pixel every N_THETA/2 cycles with IMPL = 2 (parallel DA
// units), every (N_THETA/2 - 1) * N/K + 1 cycles with IMPL = 1 (serial DA
// units); the angle recursion needs N_THETA/2 - 1 iterations per pixel.
// Defaults: 16-bit data, 4-bit blocks, 128 angles, 128x128 image, following
// the evaluated configuration, and one engine (M = 1); FRAC, NRHO, RHO_OFS,
// CNT_W, the dispatch rule and the private grids of a multi-engine build are
// this design's choices; the shared multi-port tables follow the
// architecture.
module hough_cbrm_top
  import cbrm_pkg::*;
#(
  parameter int N       = 16,
  parameter int K       = 4,
  parameter int LUT_W   = 16,
  parameter int FRAC    = 7,
  parameter int IMPL    = 2,
  parameter int N_THETA = 128,
  parameter int CW      = 7,
  parameter int NRHO    = 320,
  parameter int RHO_OFS = 128,
  parameter int CNT_W   = 16,
  parameter int M       = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // grid clear
  input  logic                        clear_start,
  output logic                        clear_busy,
  // edge pixel stream
  input  logic                        pix_valid,
  output logic                        pix_ready,
  input  logic [CW-1:0]               pix_x,
  input  logic [CW-1:0]               pix_y,
  output logic                        ht_idle,
  // peak search
  input  logic                        peak_start,
  output logic                        peak_busy,
  output logic                        peak_done,
  output logic [$clog2(N_THETA)-1:0]  peak_theta,
  output logic [$clog2(NRHO)-1:0]     peak_rho,
  output logic [CNT_W-1:0]            peak_count,
  // grid read port
  input  logic                        rd_en,
  input  logic [$clog2(N_THETA)-1:0]  rd_theta,
  input  logic [$clog2(NRHO)-1:0]     rd_rho,
  output logic [CNT_W-1:0]            rd_count,
  // status
  output logic [31:0]                 dropped_votes,
  output logic                        vote_saturated
);
  localparam int TW = $clog2(N_THETA);
  localparam int RW = $clog2(NRHO);
  localparam int P  = (IMPL == 1) ? 1 : N / K;   // table ports per unit

  logic [M*P-1:0][2*K+1:0]   lut_i_addr, lut_ii_addr;
  logic [M*P-1:0][LUT_W-1:0] lut_i_data, lut_ii_data;

  logic [M-1:0]     eng_valid, eng_ready, eng_idle, eng_clr, eng_sat;
  logic [CNT_W-1:0] eng_count [M];
  logic [31:0]      eng_drop  [M];
  logic [M-1:0]     grant;
  logic [CNT_W-1:0] sum_count;
  logic [31:0]      sum_drop;
  logic             pk_rd_en;
  logic [TW-1:0]    pk_rd_theta;
  logic [RW-1:0]    pk_rd_rho;
  logic             acc_rd_en;
  logic [TW-1:0]    acc_rd_theta;
  logic [RW-1:0]    acc_rd_rho;

  // Dispatch: the lowest-numbered ready engine takes the pixel.
  always_comb begin
    grant = '0;
    for (int e = M - 1; e >= 0; e--) begin
      if (eng_ready[e]) grant = M'(1) << e;
    end
    eng_valid = (pix_valid && !clear_busy) ? grant : '0;
    pix_ready = |eng_ready && !clear_busy;
  end

  // One table per coefficient pair, P read ports for each engine.
  conv_lut #(.K(K), .LUT_W(LUT_W), .PORTS(M*P),
             .C_SELF(alpha_q(N_THETA)), .C_CROSS(beta_q(N_THETA))) u_lut_i (
    .addr(lut_i_addr), .data(lut_i_data));
  conv_lut #(.K(K), .LUT_W(LUT_W), .PORTS(M*P),
             .C_SELF(alpha_q(N_THETA)), .C_CROSS(-beta_q(N_THETA))) u_lut_ii (
    .addr(lut_ii_addr), .data(lut_ii_data));

  for (genvar e = 0; e < M; e++) begin : g_eng
    cbrm_engine #(.N(N), .K(K), .LUT_W(LUT_W), .FRAC(FRAC), .IMPL(IMPL), .N_THETA(N_THETA),
                  .CW(CW), .NRHO(NRHO), .RHO_OFS(RHO_OFS), .CNT_W(CNT_W)) u_eng (
      .clk, .rst_n, .clear_start, .clear_busy(eng_clr[e]),
      .pix_valid(eng_valid[e]), .pix_ready(eng_ready[e]), .pix_x, .pix_y, .idle(eng_idle[e]),
      .lut_i_addr(lut_i_addr[e*P +: P]), .lut_i_data(lut_i_data[e*P +: P]),
      .lut_ii_addr(lut_ii_addr[e*P +: P]), .lut_ii_data(lut_ii_data[e*P +: P]),
      .rd_en(acc_rd_en), .rd_theta(acc_rd_theta), .rd_rho(acc_rd_rho),
      .rd_count(eng_count[e]), .dropped(eng_drop[e]), .saturated(eng_sat[e]));
  end

  // Sum of the engines' grids, saturating at the counter maximum.
  always_comb begin
    logic [CNT_W+$clog2(M+1)-1:0] acc;
    acc      = '0;
    sum_drop = '0;
    for (int e = 0; e < M; e++) begin
      acc      = acc + (CNT_W+$clog2(M+1))'(eng_count[e]);
      sum_drop = sum_drop + eng_drop[e];
    end
    sum_count = (acc > (CNT_W+$clog2(M+1))'({CNT_W{1'b1}})) ? '1 : CNT_W'(acc);
  end

  peak_finder #(.N_THETA(N_THETA), .NRHO(NRHO), .CNT_W(CNT_W)) u_peak (
    .clk, .rst_n, .start(peak_start && !clear_busy), .busy(peak_busy), .done(peak_done),
    .rd_en(pk_rd_en), .rd_theta(pk_rd_theta), .rd_rho(pk_rd_rho), .rd_count(sum_count),
    .peak_theta, .peak_rho, .peak_count);

  always_comb begin
    acc_rd_en      = peak_busy ? pk_rd_en    : rd_en;
    acc_rd_theta   = peak_busy ? pk_rd_theta : rd_theta;
    acc_rd_rho     = peak_busy ? pk_rd_rho   : rd_rho;
    clear_busy     = |eng_clr;
    ht_idle        = &eng_idle && !clear_busy;
    rd_count       = sum_count;
    dropped_votes  = sum_drop;
    vote_saturated = |eng_sat;
  end
endmodule
