// tb_hough_accumulator: checks the voting grid on a small configuration
// (8 angles, 20 rho cells, offset 8, rho with 7 fractional bits). Random votes
// with rho values inside and outside the grid are cast; a model quantises each
// to round(rho) + 8, counts rho_I in angle i and rho_II in angle i + 4, and
// counts the values that fall outside. All cells are then read back through
// the one-cycle read port, and the dropped-vote count is compared.
module tb_hough_accumulator;
  int checks = 0, failures = 0;
  localparam int NT = 8, NH = 4, NR = 20, OFS = 8, FRAC = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clear_start, clear_busy, vote_valid, rd_en, saturated;
  logic [1:0]  vote_theta;
  logic [15:0] rho_i, rho_ii;
  logic [2:0]  rd_theta;
  logic [4:0]  rd_rho;
  logic [15:0] rd_count;
  logic [31:0] dropped;
  int          model [NT][NR];
  int          exp_dropped, in_lo, in_hi;

  hough_accumulator #(.N(16), .FRAC(FRAC), .N_THETA(NT), .NRHO(NR), .RHO_OFS(OFS), .CNT_W(16)) dut (
    .clk, .rst_n, .clear_start, .clear_busy, .vote_valid, .vote_theta, .rho_i, .rho_ii,
    .rd_en, .rd_theta, .rd_rho, .rd_count, .dropped, .saturated);

  // round half up of v / 2^FRAC, then offset
  function automatic int qidx(input int v);
    return int'($floor((real'(v) + 64.0) / 128.0)) + OFS;
  endfunction

  initial begin
    clear_start = 0; vote_valid = 0; rd_en = 0; vote_theta = 0; rho_i = 0; rho_ii = 0;
    rd_theta = 0; rd_rho = 0; exp_dropped = 0; in_lo = 0; in_hi = 0;
    foreach (model[t, r]) model[t][r] = 0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    while (clear_busy) begin @(posedge clk); #1; end
    repeat (2000) begin
      int t, a, b, qa, qb;
      t = $urandom_range(0, NH - 1);
      a = $urandom_range(0, 3600) - 1800;   // about -14 .. +14 rho units
      b = $urandom_range(0, 3600) - 1800;
      if ($urandom_range(0, 20) == 0) a = 32767;
      if ($urandom_range(0, 20) == 0) b = -32768;
      vote_valid = 1'b1; vote_theta = 2'(t); rho_i = 16'(a); rho_ii = 16'(b);
      qa = qidx(a); qb = qidx(b);
      if (qa >= 0 && qa < NR) begin model[t][qa]++; in_lo++; end else exp_dropped++;
      if (qb >= 0 && qb < NR) begin model[t + NH][qb]++; in_hi++; end else exp_dropped++;
      @(posedge clk); #1;
      vote_valid = 1'b0;
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    for (int t = 0; t < NT; t++) for (int r = 0; r < NR; r++) begin
      rd_en = 1'b1; rd_theta = 3'(t); rd_rho = 5'(r);
      @(posedge clk); #1;
      rd_en = 1'b0;
      checks++;
      if (int'(rd_count) != model[t][r]) begin
        failures++; $display("FAIL cell (%0d,%0d) got %0d exp %0d", t, r, rd_count, model[t][r]);
      end
    end
    checks += 2;
    if (int'(dropped) != exp_dropped) begin failures++; $display("FAIL dropped %0d exp %0d", dropped, exp_dropped); end
    if (exp_dropped == 0 || in_lo == 0 || in_hi == 0) failures++;
    // clear empties the grid and the dropped count
    clear_start = 1'b1; @(posedge clk); #1; clear_start = 1'b0;
    while (clear_busy) begin @(posedge clk); #1; end
    for (int t = 0; t < NT; t++) for (int r = 0; r < NR; r++) begin
      rd_en = 1'b1; rd_theta = 3'(t); rd_rho = 5'(r);
      @(posedge clk); #1;
      rd_en = 1'b0;
      checks++;
      if (rd_count != 0) begin failures++; $display("FAIL not cleared (%0d,%0d)", t, r); end
    end
    checks++;
    if (dropped != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
