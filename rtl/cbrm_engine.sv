// cbrm_engine: one complete CBRM Hough processor with its own voting grid.
//
// Groups the ht_sequencer (pixel/angle control), the cbrm_pair (crossed
// recursion in distributed arithmetic) and a hough_accumulator holding this
// engine's votes. Pixels enter on pix_valid/pix_ready; the grid is read, one
// cycle after rd_en, through rd_*. Several engines can run side by side on
// disjoint subsets of the pixels, each with a private grid, so that their
// votes never collide; the top sums the grids on reading. The two
// Convolution-LUTs are not inside the engine: its pair reads them through the
// lut_* ports (P read ports per table), so all engines share one table of
// each kind.
// Timing is that of the sequencer: one pixel every N_THETA/2 cycles with the
// parallel DA units, (N_THETA/2 - 1) * N/K + 1 with the serial ones.
module cbrm_engine #(
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
  localparam int P      = (IMPL == 1) ? 1 : N / K
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear_start,
  output logic                        clear_busy,
  input  logic                        pix_valid,
  output logic                        pix_ready,
  input  logic [CW-1:0]               pix_x,
  input  logic [CW-1:0]               pix_y,
  output logic                        idle,
  output logic [P-1:0][2*K+1:0]       lut_i_addr,
  input  logic [P-1:0][LUT_W-1:0]     lut_i_data,
  output logic [P-1:0][2*K+1:0]       lut_ii_addr,
  input  logic [P-1:0][LUT_W-1:0]     lut_ii_data,
  input  logic                        rd_en,
  input  logic [$clog2(N_THETA)-1:0]  rd_theta,
  input  logic [$clog2(NRHO)-1:0]     rd_rho,
  output logic [CNT_W-1:0]            rd_count,
  output logic [31:0]                 dropped,
  output logic                        saturated
);
  localparam int TW = $clog2(N_THETA);

  logic          pair_load, pair_step, pair_ready, pair_iter;
  logic [CW-1:0] pair_x, pair_y;
  logic [N-1:0]  rho_i, rho_ii;
  logic          vote_valid;
  logic [TW-2:0] vote_theta;

  ht_sequencer #(.CW(CW), .N_THETA(N_THETA)) u_seq (
    .clk, .rst_n, .pix_valid, .pix_ready, .pix_x, .pix_y,
    .pair_load, .pair_x, .pair_y, .pair_step, .pair_ready,
    .vote_valid, .vote_theta, .idle);

  cbrm_pair #(.N(N), .K(K), .LUT_W(LUT_W), .FRAC(FRAC), .CW(CW), .IMPL(IMPL)) u_pair (
    .clk, .rst_n, .load(pair_load), .x0(pair_x), .y0(pair_y), .step(pair_step),
    .ready(pair_ready), .iter_done(pair_iter), .lut_i_addr, .lut_i_data, .lut_ii_addr, .lut_ii_data,
    .rho_i, .rho_ii);

  hough_accumulator #(.N(N), .FRAC(FRAC), .N_THETA(N_THETA), .NRHO(NRHO),
                      .RHO_OFS(RHO_OFS), .CNT_W(CNT_W)) u_acc (
    .clk, .rst_n, .clear_start, .clear_busy,
    .vote_valid, .vote_theta, .rho_i, .rho_ii,
    .rd_en, .rd_theta, .rd_rho, .rd_count, .dropped, .saturated);

  // The sequencer loads a new pixel only when no iteration result is due.
  always_ff @(posedge clk) begin
    assert (!(pair_iter && pair_load)) else $error("pixel load during an iteration");
  end
endmodule
