// vote_bank: one bank of vote counters of the Hough domain.
//
// THETAS x NRHO counters of CNT_W bits, addressed {theta, rho}. One
// increment port performs a read-modify-write in a single cycle (the counter
// saturates at its maximum instead of wrapping). One read port returns a
// counter one cycle after rd_en. A clear sweep writes zero to one counter per
// cycle; it starts by itself after reset and on clear_start, and clear_busy is
// high while it runs. Increments during a sweep are ignored.
// The voting grid is the Hough domain of the architecture; counter width,
// saturation, the banked organisation and the clear sweep are this design's.
module vote_bank #(
  parameter int THETAS = 64,
  parameter int NRHO   = 320,
  parameter int CNT_W  = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear_start,
  output logic                        clear_busy,
  input  logic                        inc_en,
  input  logic [$clog2(THETAS)-1:0]   inc_theta,
  input  logic [$clog2(NRHO)-1:0]     inc_rho,
  input  logic                        rd_en,
  input  logic [$clog2(THETAS)-1:0]   rd_theta,
  input  logic [$clog2(NRHO)-1:0]     rd_rho,
  output logic [CNT_W-1:0]            rd_count,
  output logic                        saturated   // an increment hit a full counter
);
  localparam int DEPTH = THETAS * NRHO;
  localparam int AW    = $clog2(DEPTH);

  logic [CNT_W-1:0] mem [DEPTH];
  logic [AW-1:0]    clr_q;
  logic [AW-1:0]    inc_a, rd_a;
  logic [CNT_W-1:0] old;

  always_comb begin
    inc_a     = AW'(inc_theta) * AW'(NRHO) + AW'(inc_rho);
    rd_a      = AW'(rd_theta) * AW'(NRHO) + AW'(rd_rho);
    old       = mem[inc_a];
    saturated = inc_en && !clear_busy && (old == '1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clear_busy <= 1'b1;
      clr_q      <= '0;
    end else if (clear_busy) begin
      clr_q <= clr_q + AW'(1);
      if (clr_q == AW'(DEPTH - 1)) clear_busy <= 1'b0;
    end else if (clear_start) begin
      clear_busy <= 1'b1;
      clr_q      <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (clear_busy)                mem[clr_q] <= '0;
    else if (inc_en && !saturated) mem[inc_a] <= old + CNT_W'(1);
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_count <= mem[rd_a];
  end
endmodule
