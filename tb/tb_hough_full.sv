// tb_hough_full: the Hough engine at its default parameters (16-bit data,
// 4-bit blocks, parallel DA units, 128 angles, 128 x 128 image, 320 rho
// cells) taken through complete frames by top_check: clear, edge pixels in,
// every cell of the voting grid compared with the reference model, peak
// search.
module tb_hough_full;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;
  logic fin;

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

  top_check #(.NOISE(300), .NAME("full")) u_chk (
    .clk, .rst_n, .clear_start(clr), .clear_busy(clrb),
    .pix_valid(pv), .pix_ready(pr), .pix_x(px), .pix_y(py), .ht_idle(idle),
    .peak_start(ps), .peak_busy(pb), .peak_done(pd), .peak_theta(pt), .peak_rho(prr),
    .peak_count(pc), .rd_en(rd), .rd_theta(rt), .rd_rho(rr), .rd_count(rc),
    .dropped_votes(drop), .vote_saturated(sat),
    .checks(checks), .failures(failures), .finished(fin));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
