// top_check: stimulus and checking for one hough_cbrm_top instance.
//
// Connects to all ports of a hough_cbrm_top with the same parameters and runs
// two frames. Frame 1 is a synthetic 128 x 128 edge image: a vertical line
// x = 40 (theta = 0, rho = 40, 128 pixels), a horizontal segment y = 90
// (theta = pi/2, 100 pixels), a diagonal x + y = 100 (theta = pi/4,
// rho = 70.7), a descending line y = x - 40 (theta = 3pi/4, rho = -28.3) and
// NOISE random pixels. Frame 2, after a clear_start, holds the last line and
// noise only. The first half of each frame is offered back to back, the
// second half with random gaps.
// Checks: every grid cell equals a reference grid built from the bit-exact
// step model (tb_ref_pkg); each line's cell (+-1 rho cell where rho is not an
// integer) holds at least its pixel count; the peak equals the reference
// maximum and lies on the vertical line in frame 1; consecutive back-to-back
// pixels are accepted exactly (N_THETA/2 - 1) * ITER + 1 cycles apart, where
// an iteration takes ITER = 1 cycle for IMPL = 2 and N/K for IMPL = 1 (the
// last angle needs no further iteration, and the next load overlaps the last
// vote). It also counts how often each
// mechanism happened (clear sweeps, back-to-back loads, stream gaps, votes
// with negative rho, votes in each half of the angle range, peak searches,
// engines working at once when M > 1)
// and counts a failure for any that never happened.
module top_check
  import cbrm_pkg::*;
  import tb_ref_pkg::*;
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
  parameter int M       = 1,
  parameter int NOISE   = 60,
  parameter string NAME = "top"
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic                        clear_start,
  input  logic                        clear_busy,
  output logic                        pix_valid,
  input  logic                        pix_ready,
  output logic [CW-1:0]               pix_x,
  output logic [CW-1:0]               pix_y,
  input  logic                        ht_idle,
  output logic                        peak_start,
  input  logic                        peak_busy,
  input  logic                        peak_done,
  input  logic [$clog2(N_THETA)-1:0]  peak_theta,
  input  logic [$clog2(NRHO)-1:0]     peak_rho,
  input  logic [CNT_W-1:0]            peak_count,
  output logic                        rd_en,
  output logic [$clog2(N_THETA)-1:0]  rd_theta,
  output logic [$clog2(NRHO)-1:0]     rd_rho,
  input  logic [CNT_W-1:0]            rd_count,
  input  logic [31:0]                 dropped_votes,
  input  logic                        vote_saturated,
  output int                          checks,
  output int                          failures,
  output logic                        finished
);
  localparam int     NH   = N_THETA / 2;
  localparam int     ITER = (IMPL == 1) ? N / K : 1;
  localparam longint A    = alpha_q(N_THETA);
  localparam longint B    = beta_q(N_THETA);

  int grid [N_THETA][NRHO];
  int px [$], py [$];
  int n_clear, n_b2b, n_gap, n_neg, n_lo, n_hi, n_peak, n_multi;
  int cycle = 0;
  always @(posedge clk) cycle++;

  function automatic int qidx(input longint v);
    return int'((v + (longint'(1) << (FRAC - 1))) >>> FRAC) + RHO_OFS;
  endfunction

  // Reference votes of one pixel.
  task automatic model_pixel(input int x, input int y);
    longint ri, rii, ni, nii;
    int qi, qii;
    ri = longint'(x) << FRAC; rii = longint'(y) << FRAC;
    for (int i = 0; i < NH; i++) begin
      qi = qidx(ri); qii = qidx(rii);
      if (qi >= 0 && qi < NRHO) grid[i][qi]++;
      if (qii >= 0 && qii < NRHO) grid[i + NH][qii]++;
      if (ri < 0 || rii < 0) n_neg++;
      n_lo++; n_hi++;
      ni  = ref_step(ri, rii, A, B, N, K, LUT_W);
      nii = ref_step(rii, ri, A, -B, N, K, LUT_W);
      ri = ni; rii = nii;
    end
  endtask

  task automatic build_frame(input bit first);
    px.delete(); py.delete();
    if (first) begin
      for (int y = 0; y < 128; y++) begin px.push_back(40); py.push_back(y); end
      for (int x = 0; x < 100; x++) begin px.push_back(x); py.push_back(90); end
      for (int x = 20; x <= 100; x++) begin px.push_back(x); py.push_back(100 - x); end
    end
    for (int x = 40; x < 128; x++) begin px.push_back(x); py.push_back(x - 40); end
    for (int n = 0; n < NOISE; n++) begin
      px.push_back($urandom_range(0, 127)); py.push_back($urandom_range(0, 127));
    end
  endtask

  task automatic send_frame();
    int np, t0, t1, per_pixel;
    np = px.size();
    per_pixel = (NH - 1) * ITER + 1;
    t0 = cycle;
    for (int p = 0; p < np; p++) begin
      int cyc;
      bit gap;
      if (p == np / 2) begin
        // the back-to-back half took about ceil(np/2 / M) pixel slots
        t1 = cycle;
        checks++;
        if (t1 - t0 > ((np / 2 + M - 1) / M + 1) * per_pixel) begin
          failures++;
          $display("FAIL %s %0d back-to-back pixels took %0d cycles", NAME, np / 2, t1 - t0);
        end
        if (M > 1 && t1 - t0 < (np / 2) * per_pixel / 2) n_multi++;
      end
      gap = (p >= np / 2) && ($urandom_range(0, 2) == 0);
      if (gap) begin
        repeat ($urandom_range(NH * ITER, 2 * NH * ITER)) @(posedge clk);
        #1;
        n_gap++;
      end
      pix_valid = 1'b1; pix_x = CW'(px[p]); pix_y = CW'(py[p]);
      cyc = 0;
      #1;
      while (!pix_ready) begin @(posedge clk); #1; cyc++; end
      // accepted in this cycle
      if (!ht_idle) n_b2b++;
      if (M == 1 && p > 0 && !gap && p < np / 2) begin
        checks++;
        if (cyc + 1 != (NH - 1) * ITER + 1 && p > 1) begin
          failures++;
          $display("FAIL %s pixel %0d accepted %0d cycles after the previous one", NAME, p, cyc + 1);
        end
      end
      model_pixel(px[p], py[p]);
      @(posedge clk); #1;
      pix_valid = 1'b0;
    end
    while (!ht_idle) begin @(posedge clk); #1; end
  endtask

  task automatic check_grid();
    int bad;
    bad = 0;
    for (int t = 0; t < N_THETA; t++) for (int r = 0; r < NRHO; r++) begin
      rd_en = 1'b1; rd_theta = ($clog2(N_THETA))'(t); rd_rho = ($clog2(NRHO))'(r);
      @(posedge clk); #1;
      rd_en = 1'b0;
      checks++;
      if (int'(rd_count) != grid[t][r]) begin
        failures++; bad++;
        if (bad < 10) $display("FAIL %s cell (%0d,%0d) got %0d exp %0d", NAME, t, r, rd_count, grid[t][r]);
      end
    end
  endtask

  function automatic int near(input int t, input int r);
    return grid[t][r - 1] + grid[t][r] + grid[t][r + 1];
  endfunction

  task automatic run_peak(input bit first);
    int bc, bt, br;
    bc = 0; bt = 0; br = 0;
    for (int t = 0; t < N_THETA; t++) for (int r = 0; r < NRHO; r++)
      if (grid[t][r] > bc) begin bc = grid[t][r]; bt = t; br = r; end
    peak_start = 1'b1;
    @(posedge clk); #1;
    peak_start = 1'b0;
    while (!peak_done) begin @(posedge clk); #1; end
    n_peak++;
    checks += 2;
    if (int'(peak_count) != bc || int'(peak_theta) != bt || int'(peak_rho) != br) begin
      failures++;
      $display("FAIL %s peak (%0d,%0d)=%0d exp (%0d,%0d)=%0d", NAME, peak_theta, peak_rho, peak_count, bt, br, bc);
    end
    if (first && (peak_theta != 0 || int'(peak_rho) != 40 + RHO_OFS || peak_count < 128)) begin
      failures++;
      $display("FAIL %s peak not on the vertical line", NAME);
    end
    $display("%s: peak at theta index %0d, rho index %0d, %0d votes", NAME, peak_theta, peak_rho, peak_count);
  endtask

  task automatic wait_clear();
    if (clear_busy) n_clear++;
    while (clear_busy) begin @(posedge clk); #1; end
    foreach (grid[t, r]) grid[t][r] = 0;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    clear_start = 0; pix_valid = 0; pix_x = '0; pix_y = '0; peak_start = 0;
    rd_en = 0; rd_theta = '0; rd_rho = '0;
    n_clear = 0; n_b2b = 0; n_gap = 0; n_neg = 0; n_lo = 0; n_hi = 0; n_peak = 0; n_multi = 0;
    @(posedge rst_n);
    @(posedge clk); #1;
    wait_clear();                       // automatic clear after reset
    // frame 1
    build_frame(1);
    send_frame();
    check_grid();
    checks += 4;
    if (grid[0][40 + RHO_OFS] < 128)                       begin failures++; $display("FAIL %s vertical line", NAME); end
    if (grid[NH][90 + RHO_OFS] < 100)                      begin failures++; $display("FAIL %s horizontal line", NAME); end
    if (near(NH / 2, 71 + RHO_OFS) < 81)                   begin failures++; $display("FAIL %s diagonal line", NAME); end
    if (near(NH + NH / 2, -28 + RHO_OFS) < 88)             begin failures++; $display("FAIL %s descending line", NAME); end
    run_peak(1);
    checks++;
    if (dropped_votes != 0 || vote_saturated) begin failures++; $display("FAIL %s dropped votes", NAME); end
    // frame 2 after an explicit clear
    clear_start = 1'b1;
    @(posedge clk); #1;
    clear_start = 1'b0;
    wait_clear();
    build_frame(0);
    send_frame();
    check_grid();
    checks++;
    if (near(NH + NH / 2, -28 + RHO_OFS) < 88) begin failures++; $display("FAIL %s descending line", NAME); end
    run_peak(0);
    // mechanisms
    $display("%s mechanisms: clears=%0d back_to_back=%0d gaps=%0d neg_rho_votes=%0d votes_lo=%0d votes_hi=%0d peaks=%0d serial=%0d engines_overlapping=%0d",
             NAME, n_clear, n_b2b, n_gap, n_neg, n_lo, n_hi, n_peak, IMPL == 1, n_multi);
    if (M > 1) begin
      checks++;
      if (n_multi < 2) begin failures++; $display("FAIL %s engines never overlapped", NAME); end
    end
    checks += 7;
    if (n_clear < 2) failures++;
    if (n_b2b == 0)  failures++;
    if (n_gap == 0)  failures++;
    if (n_neg == 0)  failures++;
    if (n_lo == 0)   failures++;
    if (n_hi == 0)   failures++;
    if (n_peak < 2)  failures++;
    finished = 1'b1;
  end
endmodule
