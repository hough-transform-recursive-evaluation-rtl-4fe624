// hough_accumulator: the voting grid of the Hough domain.
//
// Each vote carries an angle index i in [0, N_THETA/2) and the two values of
// the crossed recursion: rho_I belongs to theta_i, rho_II to theta_i + pi/2.
// Both are quantised to grid index round(rho) + RHO_OFS (unit rho step,
// round half up from FRAC fractional bits) and counted in two banks, bank 0
// for theta in [0, pi/2) and bank 1 for [pi/2, pi), so the two votes of an
// iteration never collide. A value outside [0, NRHO) is not counted and
// increments the dropped counter. The read port takes a full angle index
// (0 .. N_THETA-1) and a rho index and answers one cycle later.
// The voting grid follows the architecture; the rho range and step, the
// banking and the dropped-vote counter are this design's choices.
module hough_accumulator #(
  parameter int N       = 16,
  parameter int FRAC    = 7,
  parameter int N_THETA = 128,
  parameter int NRHO    = 320,
  parameter int RHO_OFS = 128,
  parameter int CNT_W   = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear_start,
  output logic                        clear_busy,
  input  logic                        vote_valid,
  input  logic [$clog2(N_THETA)-2:0]  vote_theta,
  input  logic [N-1:0]                rho_i,
  input  logic [N-1:0]                rho_ii,
  input  logic                        rd_en,
  input  logic [$clog2(N_THETA)-1:0]  rd_theta,
  input  logic [$clog2(NRHO)-1:0]     rd_rho,
  output logic [CNT_W-1:0]            rd_count,
  output logic [31:0]                 dropped,
  output logic                        saturated
);
  localparam int NH = N_THETA / 2;
  localparam int TW = $clog2(N_THETA) - 1;
  localparam int RW = $clog2(NRHO);
  localparam int QW = N - FRAC + 2;

  logic signed [QW-1:0] q_i, q_ii;
  logic                 ok_i, ok_ii;
  logic [1:0]           clr_busy, sat;
  logic [CNT_W-1:0]     rd_cnt [2];
  logic                 rd_bank_q;

  // round(rho) + RHO_OFS, computed wide enough never to overflow.
  function automatic logic signed [QW-1:0] quantise(input logic [N-1:0] r);
    logic signed [N:0] biased;
    biased = signed'({r[N-1], r}) + (N+1)'(1 << (FRAC-1));
    return QW'(biased >>> FRAC) + QW'(RHO_OFS);
  endfunction

  always_comb begin
    q_i   = quantise(rho_i);
    q_ii  = quantise(rho_ii);
    ok_i  = (q_i  >= 0) && (q_i  < QW'(NRHO));
    ok_ii = (q_ii >= 0) && (q_ii < QW'(NRHO));
  end

  vote_bank #(.THETAS(NH), .NRHO(NRHO), .CNT_W(CNT_W)) u_bank_lo (
    .clk, .rst_n, .clear_start, .clear_busy(clr_busy[0]),
    .inc_en(vote_valid && ok_i), .inc_theta(vote_theta), .inc_rho(RW'(q_i)),
    .rd_en(rd_en && !rd_theta[TW]), .rd_theta(rd_theta[TW-1:0]), .rd_rho,
    .rd_count(rd_cnt[0]), .saturated(sat[0]));

  vote_bank #(.THETAS(NH), .NRHO(NRHO), .CNT_W(CNT_W)) u_bank_hi (
    .clk, .rst_n, .clear_start, .clear_busy(clr_busy[1]),
    .inc_en(vote_valid && ok_ii), .inc_theta(vote_theta), .inc_rho(RW'(q_ii)),
    .rd_en(rd_en && rd_theta[TW]), .rd_theta(rd_theta[TW-1:0]), .rd_rho,
    .rd_count(rd_cnt[1]), .saturated(sat[1]));

  assign clear_busy = |clr_busy;
  assign saturated  = |sat;
  assign rd_count   = rd_cnt[rd_bank_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank_q <= 1'b0;
      dropped   <= '0;
    end else begin
      if (rd_en) rd_bank_q <= rd_theta[TW];
      if (clear_start && !clear_busy) dropped <= '0;
      else if (vote_valid && !clear_busy)
        dropped <= dropped + 32'(!ok_i) + 32'(!ok_ii);
    end
  end
endmodule
