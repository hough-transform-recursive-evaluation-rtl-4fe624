// tb_full_image: throughput workload at the default parameters. Every pixel
// of a 128 x 128 image is an edge pixel (16384 pixels, the worst case of a
// 128 x 128 binary image with 128 angles). The pixels are streamed back to
// back; the test checks that the transform takes 64 * 128 * 128 cycles plus
// the first load cycle (one recursion iteration or load per cycle, 64 angle
// pairs per pixel), that every cell of the voting grid matches the reference model and that the peak
// search returns the reference maximum. The line rho = x cos + y sin at
// theta = 0 gets exactly 128 votes in every cell 0..127 as a sanity check.
module tb_full_image;
  import cbrm_pkg::*;
  import tb_ref_pkg::*;

  localparam int NT = 128, NH = 64, NR = 320, OFS = 128, FRAC = 7;
  localparam longint A = alpha_q(NT), B = beta_q(NT);

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clr, clrb, pv, pr, idle, ps, pb, pd, rd, sat;
  logic [6:0]  px, py, pt, rt;
  logic [8:0]  prr, rr;
  logic [15:0] pc, rc;
  logic [31:0] drop;

  hough_cbrm_top u_top (
    .clk, .rst_n, .clear_start(clr), .clear_busy(clrb),
    .pix_valid(pv), .pix_ready(pr), .pix_x(px), .pix_y(py), .ht_idle(idle),
    .peak_start(ps), .peak_busy(pb), .peak_done(pd), .peak_theta(pt), .peak_rho(prr),
    .peak_count(pc), .rd_en(rd), .rd_theta(rt), .rd_rho(rr), .rd_count(rc),
    .dropped_votes(drop), .vote_saturated(sat));

  int grid [NT][NR];
  int cycle = 0;
  always @(posedge clk) cycle++;

  function automatic int qidx(input longint v);
    return int'((v + (longint'(1) << (FRAC - 1))) >>> FRAC) + OFS;
  endfunction

  task automatic model_pixel(input int x, input int y);
    longint ri, rii, ni, nii;
    ri = longint'(x) << FRAC; rii = longint'(y) << FRAC;
    for (int i = 0; i < NH; i++) begin
      grid[i][qidx(ri)]++;
      grid[i + NH][qidx(rii)]++;
      ni  = ref_step(ri, rii, A, B, 16, 4, 16);
      nii = ref_step(rii, ri, A, -B, 16, 4, 16);
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
    $display("16384 pixels transformed in %0d cycles", t1 - t0);
    checks++;
    if (t1 - t0 != 64 * 128 * 128 + 1) begin failures++; $display("FAIL cycle count"); end
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
    checks++;
    if (drop != 0 || sat) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1300000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
