// ht_sequencer: pixel and angle control of the CBRM Hough engine.
//
// Accepts edge-pixel coordinates on a valid/ready handshake. For each pixel it
// loads the coordinates into the cbrm_pair registers (rho_I(0) = x,
// rho_II(0) = y) and then walks the angle index i = 0 .. N_THETA/2-1: in every
// cycle where the pair is ready it issues a vote for index i (the pair's
// present rho_I belongs to theta_i, rho_II to theta_i + pi/2) and, except for
// the last index, steps the recursion. The next pixel is accepted in the cycle
// of the last vote, so a pixel costs N_THETA/2 - 1 iterations plus one cycle:
// N_THETA/2 cycles with the parallel units, (N_THETA/2 - 1) * N/K + 1 with
// the serial ones.
// idle is high when no pixel is in flight.
// Evaluating [0, pi/2) and [pi/2, pi) together and starting from the pixel
// coordinates follows the architecture; the handshake is this design's.
module ht_sequencer #(
  parameter int CW      = 7,
  parameter int N_THETA = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         pix_valid,
  output logic                         pix_ready,
  input  logic [CW-1:0]                pix_x,
  input  logic [CW-1:0]                pix_y,
  output logic                         pair_load,
  output logic [CW-1:0]                pair_x,
  output logic [CW-1:0]                pair_y,
  output logic                         pair_step,
  input  logic                         pair_ready,
  output logic                         vote_valid,
  output logic [$clog2(N_THETA)-2:0]   vote_theta,   // index within [0, pi/2)
  output logic                         idle
);
  localparam int NH = N_THETA / 2;
  localparam int IW = $clog2(N_THETA) - 1;

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t        state_q;
  logic [IW-1:0] idx_q;
  logic          last;

  always_comb begin
    last       = (idx_q == IW'(NH - 1));
    vote_valid = (state_q == S_RUN) && pair_ready;
    vote_theta = idx_q;
    pair_step  = vote_valid && !last;
    pix_ready  = (state_q == S_IDLE) || (vote_valid && last);
    pair_load  = pix_valid && pix_ready;
    pair_x     = pix_x;
    pair_y     = pix_y;
    idle       = (state_q == S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
    end else begin
      if (pair_load) begin
        state_q <= S_RUN;
        idx_q   <= '0;
      end else if (vote_valid) begin
        if (last) state_q <= S_IDLE;
        else      idx_q   <= idx_q + IW'(1);
      end
    end
  end

  initial assert (N_THETA % 2 == 0 && N_THETA >= 4) else $error("N_THETA must be even");
endmodule
