// tb_peak_finder: checks the grid scan against a model grid (8 x 12 cells)
// held in the testbench and served with one cycle of read latency, as the
// accumulator does. Several random grids are scanned, including ties (the
// first cell in theta-major order must win) and an all-zero grid; the result
// and the scan length (N_THETA*NRHO + 2 cycles from start to done) are checked.
module tb_peak_finder;
  int checks = 0, failures = 0;
  localparam int NT = 8, NR = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done, rd_en;
  logic [2:0]  rd_theta, peak_theta;
  logic [3:0]  rd_rho, peak_rho;
  logic [15:0] rd_count, peak_count;
  int          grid [NT][NR];

  peak_finder #(.N_THETA(NT), .NRHO(NR), .CNT_W(16)) dut (
    .clk, .rst_n, .start, .busy, .done, .rd_en, .rd_theta, .rd_rho, .rd_count,
    .peak_theta, .peak_rho, .peak_count);

  always_ff @(posedge clk) if (rd_en) rd_count <= 16'(grid[rd_theta][rd_rho]);

  task automatic scan();
    int n, bt, br, bc;
    bc = 0; bt = 0; br = 0;
    for (int t = 0; t < NT; t++) for (int r = 0; r < NR; r++)
      if (grid[t][r] > bc) begin bc = grid[t][r]; bt = t; br = r; end
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    n = 1;
    while (!done && n < 1000) begin @(posedge clk); #1; n++; end
    checks += 2;
    if (n != NT * NR + 2) begin failures++; $display("FAIL scan length %0d", n); end
    if (int'(peak_count) != bc || int'(peak_theta) != bt || int'(peak_rho) != br) begin
      failures++;
      $display("FAIL peak got (%0d,%0d)=%0d exp (%0d,%0d)=%0d", peak_theta, peak_rho, peak_count, bt, br, bc);
    end
    @(posedge clk); #1;
    checks++;
    if (busy || done) begin failures++; $display("FAIL busy/done after scan"); end
  endtask

  initial begin
    start = 0;
    foreach (grid[t, r]) grid[t][r] = 0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    scan();                                    // all zero
    repeat (20) begin
      foreach (grid[t, r]) grid[t][r] = $urandom_range(0, 50);
      scan();
    end
    foreach (grid[t, r]) grid[t][r] = 3;
    grid[5][7] = 9; grid[2][11] = 9; grid[6][0] = 9;
    scan();                                    // tie: (2,11) first
    grid[NT-1][NR-1] = 10;
    scan();                                    // last cell
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
