// tb_hough_cbrm_top: end-to-end test of the Hough engine in two
// configurations side by side: the default one (parallel DA units, 16-bit
// data, 4-bit blocks, 128 angles), the bit-serial scheme (serial DA units,
// K = 1, 16 angles) and a three-engine parallel build (M = 3, 16 angles).
// All run the two frames of top_check, so the whole path
// pixel -> recursion -> voting -> peak is compared with the reference model,
// including the pixel rate of each scheme.
module tb_hough_cbrm_top;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks_a, failures_a, checks_b, failures_b;
  logic fin_a, fin_b;

  // default configuration
  logic        clr_a, clrb_a, pv_a, pr_a, idle_a, ps_a, pb_a, pd_a, rd_a, sat_a;
  logic [6:0]  px_a, py_a, pt_a, rt_a;
  logic [8:0]  prr_a, rr_a;
  logic [15:0] pc_a, rc_a;
  logic [31:0] drop_a;

  hough_cbrm_top u_top_a (
    .clk, .rst_n, .clear_start(clr_a), .clear_busy(clrb_a),
    .pix_valid(pv_a), .pix_ready(pr_a), .pix_x(px_a), .pix_y(py_a), .ht_idle(idle_a),
    .peak_start(ps_a), .peak_busy(pb_a), .peak_done(pd_a), .peak_theta(pt_a), .peak_rho(prr_a),
    .peak_count(pc_a), .rd_en(rd_a), .rd_theta(rt_a), .rd_rho(rr_a), .rd_count(rc_a),
    .dropped_votes(drop_a), .vote_saturated(sat_a));

  top_check #(.NAME("parallel")) u_chk_a (
    .clk, .rst_n, .clear_start(clr_a), .clear_busy(clrb_a),
    .pix_valid(pv_a), .pix_ready(pr_a), .pix_x(px_a), .pix_y(py_a), .ht_idle(idle_a),
    .peak_start(ps_a), .peak_busy(pb_a), .peak_done(pd_a), .peak_theta(pt_a), .peak_rho(prr_a),
    .peak_count(pc_a), .rd_en(rd_a), .rd_theta(rt_a), .rd_rho(rr_a), .rd_count(rc_a),
    .dropped_votes(drop_a), .vote_saturated(sat_a),
    .checks(checks_a), .failures(failures_a), .finished(fin_a));

  // bit-serial configuration
  logic        clr_b, clrb_b, pv_b, pr_b, idle_b, ps_b, pb_b, pd_b, rd_b, sat_b;
  logic [6:0]  px_b, py_b;
  logic [3:0]  pt_b, rt_b;
  logic [8:0]  prr_b, rr_b;
  logic [15:0] pc_b, rc_b;
  logic [31:0] drop_b;

  hough_cbrm_top #(.K(1), .IMPL(1), .N_THETA(16)) u_top_b (
    .clk, .rst_n, .clear_start(clr_b), .clear_busy(clrb_b),
    .pix_valid(pv_b), .pix_ready(pr_b), .pix_x(px_b), .pix_y(py_b), .ht_idle(idle_b),
    .peak_start(ps_b), .peak_busy(pb_b), .peak_done(pd_b), .peak_theta(pt_b), .peak_rho(prr_b),
    .peak_count(pc_b), .rd_en(rd_b), .rd_theta(rt_b), .rd_rho(rr_b), .rd_count(rc_b),
    .dropped_votes(drop_b), .vote_saturated(sat_b));

  top_check #(.K(1), .IMPL(1), .N_THETA(16), .NAME("serial")) u_chk_b (
    .clk, .rst_n, .clear_start(clr_b), .clear_busy(clrb_b),
    .pix_valid(pv_b), .pix_ready(pr_b), .pix_x(px_b), .pix_y(py_b), .ht_idle(idle_b),
    .peak_start(ps_b), .peak_busy(pb_b), .peak_done(pd_b), .peak_theta(pt_b), .peak_rho(prr_b),
    .peak_count(pc_b), .rd_en(rd_b), .rd_theta(rt_b), .rd_rho(rr_b), .rd_count(rc_b),
    .dropped_votes(drop_b), .vote_saturated(sat_b),
    .checks(checks_b), .failures(failures_b), .finished(fin_b));

  // three engines sharing the pixel stream
  int checks_c, failures_c;
  logic        fin_c;
  logic        clr_c, clrb_c, pv_c, pr_c, idle_c, ps_c, pb_c, pd_c, rd_c, sat_c;
  logic [6:0]  px_c, py_c;
  logic [3:0]  pt_c, rt_c;
  logic [8:0]  prr_c, rr_c;
  logic [15:0] pc_c, rc_c;
  logic [31:0] drop_c;

  hough_cbrm_top #(.N_THETA(16), .M(3)) u_top_c (
    .clk, .rst_n, .clear_start(clr_c), .clear_busy(clrb_c),
    .pix_valid(pv_c), .pix_ready(pr_c), .pix_x(px_c), .pix_y(py_c), .ht_idle(idle_c),
    .peak_start(ps_c), .peak_busy(pb_c), .peak_done(pd_c), .peak_theta(pt_c), .peak_rho(prr_c),
    .peak_count(pc_c), .rd_en(rd_c), .rd_theta(rt_c), .rd_rho(rr_c), .rd_count(rc_c),
    .dropped_votes(drop_c), .vote_saturated(sat_c));

  top_check #(.N_THETA(16), .M(3), .NAME("three-engine")) u_chk_c (
    .clk, .rst_n, .clear_start(clr_c), .clear_busy(clrb_c),
    .pix_valid(pv_c), .pix_ready(pr_c), .pix_x(px_c), .pix_y(py_c), .ht_idle(idle_c),
    .peak_start(ps_c), .peak_busy(pb_c), .peak_done(pd_c), .peak_theta(pt_c), .peak_rho(prr_c),
    .peak_count(pc_c), .rd_en(rd_c), .rd_theta(rt_c), .rd_rho(rr_c), .rd_count(rc_c),
    .dropped_votes(drop_c), .vote_saturated(sat_c),
    .checks(checks_c), .failures(failures_c), .finished(fin_c));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin_a && fin_b && fin_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             failures_a + failures_b + failures_c);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             failures_a + failures_b + failures_c + 1);
    $finish;
  end
endmodule
