// tb_parallel_cbrm: parallel-engine workload. 128 x 128 image, 128 angles,
// 12-bit data (K = 4, 12-bit table words, 3 fractional bits so that
// |rho| <= 180 fits) and M = 21 engines, the engine count that matches the
// 0.819 ms target for 4-bit blocks and reduction-tree units. Every pixel is an
// edge pixel. All engines read the same two tables; each has its own grid and
// every read returns the sum over the engines. The test checks that the
// 16384 pixels take 64 * ceil(16384 / 21) cycles plus the final drain of at
// most M cycles (21 pixels enter back to back, then engine 0 is free again
// after 64 cycles), that every grid cell matches the bit-exact reference
// model, that the votes falling outside the grid are counted as the model
// predicts, and that the peak search returns the reference maximum. It also
// prints the largest rho error of the 12-bit recursion against real
// arithmetic: with 12-bit table words it drifts by up to about 16 rho units
// over the 63 iterations, so some votes leave the grid.
module tb_parallel_cbrm;
  import cbrm_pkg::*;
  import tb_ref_pkg::*;

  localparam int NT = 128, NH = 64, NR = 320, OFS = 128, FRAC = 3;
  localparam int N = 12, K = 4, M = 21;
  localparam longint A = alpha_q(NT), B = beta_q(NT);

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clr, clrb, pv, pr, idle, ps, pb, pd, rd, sat;
  logic [6:0]  px, py, pt, rt;
  logic [8:0]  prr, rr;
  logic [15:0] pc, rc;
  real         max_err = 0.0;
  logic [31:0] drop;

  hough_cbrm_top #(.N(N), .K(K), .LUT_W(N), .FRAC(FRAC), .M(M)) u_top (
    .clk, .rst_n, .clear_start(clr), .clear_busy(clrb),
    .pix_valid(pv), .pix_ready(pr), .pix_x(px), .pix_y(py), .ht_idle(idle),
    .peak_start(ps), .peak_busy(pb), .peak_done(pd), .peak_theta(pt), .peak_rho(prr),
    .peak_count(pc), .rd_en(rd), .rd_theta(rt), .rd_rho(rr), .rd_count(rc),
    .dropped_votes(drop), .vote_saturated(sat));

  int grid [NT][NR];
  int model_drop = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  function automatic int qidx(input longint v);
    return int'((v + (longint'(1) << (FRAC - 1))) >>> FRAC) + OFS;
  endfunction

  task automatic model_pixel(input int x, input int y);
    longint ri, rii, ni, nii;
    real    th, e;
    ri = longint'(x) << FRAC; rii = longint'(y) << FRAC;
    for (int i = 0; i < NH; i++) begin
      if (qidx(ri) >= 0 && qidx(ri) < NR) grid[i][qidx(ri)]++;
      else model_drop++;
      if (qidx(rii) >= 0 && qidx(rii) < NR) grid[i + NH][qidx(rii)]++;
      else model_drop++;
      th = PI * i / NT;
      e  = real'(ri) / (2.0 ** FRAC) - (x * $cos(th) + y * $sin(th));
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      e  = real'(rii) / (2.0 ** FRAC) - (y * $cos(th) - x * $sin(th));
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      ni  = ref_step(ri, rii, A, B, N, K, N);
      nii = ref_step(rii, ri, A, -B, N, K, N);
      ri = ni; rii = nii;
    end
  endtask

  initial begin
    int t0, t1, bad, bc, bt, br;
    clr = 0; pv = 0; px = 0; py = 0; ps = 0; rd = 0; rt = 0; rr = 0;
    foreach (grid[t, r]) grid[t][r] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    while (clrb) begin @(posedge clk); #1; end
    t0 = -1;
    for (int y = 0; y < 128; y++) for (int x = 0; x < 128; x++) begin
      pv = 1'b1; px = 7'(x); py = 7'(y);
      #1;
      while (!pr) begin @(posedge clk); #1; end
      if (t0 < 0) t0 = cycle;
      model_pixel(x, y);
      @(posedge clk); #1;
    end
    pv = 1'b0;
    while (!idle) begin @(posedge clk); #1; end
    t1 = cycle;
    $display("16384 pixels on %0d engines transformed in %0d cycles (one engine: %0d)",
             M, t1 - t0, 64 * 16384 + 1);
    $display("largest rho error of the 12-bit recursion: %f", max_err);
    checks++;
    if (t1 - t0 < 64 * ((16384 + M - 1) / M) || t1 - t0 > 64 * ((16384 + M - 1) / M) + M) begin
      failures++; $display("FAIL cycle count");
    end
    bad = 0;
    for (int t = 0; t < NT; t++) for (int r = 0; r < NR; r++) begin
      rd = 1'b1; rt = 7'(t); rr = 9'(r);
      @(posedge clk); #1;
      rd = 1'b0;
      checks++;
      if (int'(rc) != grid[t][r]) begin
        failures++; bad++;
        if (bad < 10) $display("FAIL cell (%0d,%0d) got %0d exp %0d", t, r, rc, grid[t][r]);
      end
    end
    for (int r = 0; r < 128; r++) begin
      checks++;
      if (grid[0][r + OFS] != 128) begin failures++; $display("FAIL theta=0 cell %0d", r); end
    end
    bc = 0; bt = 0; br = 0;
    for (int t = 0; t < NT; t++) for (int r = 0; r < NR; r++)
      if (grid[t][r] > bc) begin bc = grid[t][r]; bt = t; br = r; end
    ps = 1'b1; @(posedge clk); #1; ps = 1'b0;
    while (!pd) begin @(posedge clk); #1; end
    checks++;
    if (int'(pc) != bc || int'(pt) != bt || int'(prr) != br) begin
      failures++; $display("FAIL peak (%0d,%0d)=%0d exp (%0d,%0d)=%0d", pt, prr, pc, bt, br, bc);
    end
    $display("votes outside the grid: %0d (model %0d)", drop, model_drop);
    checks++;
    if (int'(drop) != model_drop || sat) begin failures++; $display("FAIL dropped votes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
