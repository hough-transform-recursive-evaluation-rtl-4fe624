// peak_finder: finds the most voted cell of the Hough domain.
//
// On start it reads every cell of the N_THETA x NRHO grid through the
// accumulator's read port (one cell per cycle, data one cycle later) and keeps
// the largest count with its (theta, rho) indices; on a tie the first cell in
// scan order (theta major) wins. done is high for one cycle when the scan has
// finished, N_THETA*NRHO + 1 cycles after the cycle that takes start; the
// result stays valid until the next start. The cell with the most votes is
// the best-supported line.
// The method only asks for the maximum of the voting grid; the full scan for
// the single global maximum is this design's choice.
module peak_finder #(
  parameter int N_THETA = 128,
  parameter int NRHO    = 320,
  parameter int CNT_W   = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  output logic                        rd_en,
  output logic [$clog2(N_THETA)-1:0]  rd_theta,
  output logic [$clog2(NRHO)-1:0]     rd_rho,
  input  logic [CNT_W-1:0]            rd_count,
  output logic [$clog2(N_THETA)-1:0]  peak_theta,
  output logic [$clog2(NRHO)-1:0]     peak_rho,
  output logic [CNT_W-1:0]            peak_count
);
  localparam int TW = $clog2(N_THETA);
  localparam int RW = $clog2(NRHO);

  logic          issuing;     // an address is being issued
  logic          pend_q;      // rd_count holds the cell at (pt_q, pr_q)
  logic [TW-1:0] pt_q;
  logic [RW-1:0] pr_q;
  logic          last;

  always_comb begin
    rd_en = issuing;
    last  = (rd_theta == TW'(N_THETA - 1)) && (rd_rho == RW'(NRHO - 1));
    busy  = issuing || pend_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing    <= 1'b0;
      pend_q     <= 1'b0;
      done       <= 1'b0;
      rd_theta   <= '0;
      rd_rho     <= '0;
      pt_q       <= '0;
      pr_q       <= '0;
      peak_theta <= '0;
      peak_rho   <= '0;
      peak_count <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        issuing    <= 1'b1;
        rd_theta   <= '0;
        rd_rho     <= '0;
        peak_count <= '0;
        peak_theta <= '0;
        peak_rho   <= '0;
      end else if (issuing) begin
        if (last) issuing <= 1'b0;
        else if (rd_rho == RW'(NRHO - 1)) begin
          rd_rho   <= '0;
          rd_theta <= rd_theta + TW'(1);
        end else begin
          rd_rho <= rd_rho + RW'(1);
        end
      end
      pend_q <= issuing;
      pt_q   <= rd_theta;
      pr_q   <= rd_rho;
      if (pend_q) begin
        if (rd_count > peak_count) begin
          peak_count <= rd_count;
          peak_theta <= pt_q;
          peak_rho   <= pr_q;
        end
        if (!issuing) done <= 1'b1;
      end
    end
  end
endmodule
