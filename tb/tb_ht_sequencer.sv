// tb_ht_sequencer: checks the pixel/angle sequencing against a model of the
// pair's ready signal. Pixels arrive with random gaps; the pair model is
// either always ready (parallel units) or busy for 3 cycles after each step
// (serial units, N/K = 4). For every pixel the test checks that it is loaded
// with its own coordinates, that exactly N_THETA/2 votes follow with angle
// indices 0, 1, ... in order, that a step accompanies every vote but the
// last, and that the next pixel is accepted in the cycle of the last vote
// when it is already waiting (N_THETA/2 iterations per pixel).
module tb_ht_sequencer;
  int checks = 0, failures = 0;
  localparam int NT = 16, NH = NT / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       pix_valid, pix_ready, pair_load, pair_step, pair_ready, vote_valid, idle;
  logic [6:0] pix_x, pix_y, pair_x, pair_y;
  logic [2:0] vote_theta;
  int         busy_cnt;
  bit         serial_mode;

  ht_sequencer #(.CW(7), .N_THETA(NT)) dut (
    .clk, .rst_n, .pix_valid, .pix_ready, .pix_x, .pix_y,
    .pair_load, .pair_x, .pair_y, .pair_step, .pair_ready,
    .vote_valid, .vote_theta, .idle);

  // Pair model: ready unless a serial iteration is in progress.
  assign pair_ready = (busy_cnt == 0);
  always_ff @(posedge clk) begin
    if (pair_step && serial_mode) busy_cnt <= 3;
    else if (busy_cnt > 0)        busy_cnt <= busy_cnt - 1;
  end

  // Monitor.
  int exp_idx, votes, loads, back_to_back, cyc, last_vote_cyc;
  logic [6:0] cur_x, cur_y;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (vote_valid) begin
      checks += 2;
      if (int'(vote_theta) != exp_idx) begin failures++; $display("FAIL vote idx %0d exp %0d", vote_theta, exp_idx); end
      if (pair_step != (exp_idx != NH - 1)) begin failures++; $display("FAIL step with vote %0d", exp_idx); end
      exp_idx++;
      votes++;
      last_vote_cyc = cyc;
    end else begin
      checks++;
      if (pair_step) begin failures++; $display("FAIL step without vote"); end
    end
    if (pair_load) begin
      checks += 2;
      if (exp_idx != 0 && exp_idx != NH) begin failures++; $display("FAIL load after %0d votes", exp_idx); end
      if (pair_x != pix_x || pair_y != pix_y) begin failures++; $display("FAIL load coords"); end
      if (vote_valid) back_to_back++;
      exp_idx = 0;
      loads++;
    end
  end

  task automatic send(input int n, input bit gaps);
    for (int p = 0; p < n; p++) begin
      pix_valid = 1'b1; pix_x = 7'($urandom); pix_y = 7'($urandom);
      do @(posedge clk); while (!pix_ready);
      #1;
      pix_valid = 1'b0;
      if (gaps) repeat ($urandom_range(0, 40)) @(posedge clk);
      #1;
    end
  endtask

  initial begin
    pix_valid = 1'b0; pix_x = '0; pix_y = '0; busy_cnt = 0; serial_mode = 0;
    exp_idx = NH; votes = 0; loads = 0; back_to_back = 0; cyc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks++; if (!idle || !pix_ready) failures++;
    send(20, 1);
    send(20, 0);
    wait (idle); @(posedge clk); #1;
    serial_mode = 1;
    send(10, 1);
    send(10, 0);
    wait (idle); @(posedge clk); #1;
    checks += 3;
    if (loads != 60) begin failures++; $display("FAIL loads %0d", loads); end
    if (votes != 60 * NH) begin failures++; $display("FAIL votes %0d", votes); end
    if (back_to_back < 20) begin failures++; $display("FAIL back-to-back loads %0d", back_to_back); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
