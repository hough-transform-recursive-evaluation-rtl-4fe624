// tb_vote_bank: checks a small vote bank (4 x 10 counters of 3 bits) against
// a model array: the automatic clear after reset (and its length of one cycle
// per counter), random increments, one-cycle reads of every counter,
// saturation at 7, and a clear started by clear_start.
module tb_vote_bank;
  int checks = 0, failures = 0;
  localparam int TH = 4, NR = 10, CW = 3, D = TH * NR;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          clear_start, clear_busy, inc_en, rd_en, saturated;
  logic [1:0]    inc_theta, rd_theta;
  logic [3:0]    inc_rho, rd_rho;
  logic [CW-1:0] rd_count;
  int            model [TH][NR];
  int            sat_seen;

  vote_bank #(.THETAS(TH), .NRHO(NR), .CNT_W(CW)) dut (
    .clk, .rst_n, .clear_start, .clear_busy, .inc_en, .inc_theta, .inc_rho,
    .rd_en, .rd_theta, .rd_rho, .rd_count, .saturated);

  task automatic wait_clear(input int expect_cycles);
    int n;
    n = 0;
    while (clear_busy) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != expect_cycles) begin failures++; $display("FAIL clear took %0d cycles", n); end
    foreach (model[t, r]) model[t][r] = 0;
  endtask

  task automatic read_all();
    for (int t = 0; t < TH; t++) for (int r = 0; r < NR; r++) begin
      rd_en = 1'b1; rd_theta = 2'(t); rd_rho = 4'(r);
      @(posedge clk); #1;
      rd_en = 1'b0;
      checks++;
      if (int'(rd_count) != model[t][r]) begin
        failures++; $display("FAIL read (%0d,%0d) got %0d exp %0d", t, r, rd_count, model[t][r]);
      end
    end
  endtask

  task automatic incs(input int n);
    repeat (n) begin
      int t, r;
      t = $urandom_range(0, TH - 1); r = $urandom_range(0, NR - 1);
      inc_en = 1'b1; inc_theta = 2'(t); inc_rho = 4'(r);
      #1;
      checks++;
      if (saturated != (model[t][r] == 7)) begin failures++; $display("FAIL saturated flag"); end
      if (saturated) sat_seen++;
      @(posedge clk); #1;
      if (model[t][r] < 7) model[t][r]++;
      inc_en = 1'b0;
    end
  endtask

  initial begin
    clear_start = 0; inc_en = 0; rd_en = 0; inc_theta = 0; inc_rho = 0; rd_theta = 0; rd_rho = 0;
    sat_seen = 0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    wait_clear(D - 1);
    read_all();
    incs(60);
    read_all();
    incs(300);       // drives many counters into saturation
    read_all();
    clear_start = 1'b1;
    @(posedge clk); #1;
    clear_start = 1'b0;
    wait_clear(D);
    read_all();
    incs(20);
    read_all();
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
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
