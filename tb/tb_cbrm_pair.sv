// tb_cbrm_pair: checks the crossed recursion for whole pixels.
// Two engines run side by side: parallel units (IMPL = 2) and serial units
// (IMPL = 1, K = 4). For random pixels and the corner pixels each engine is
// loaded with (x, y) and stepped through the 64 angles of [0, pi/2). At every
// angle rho_I and rho_II are compared bit for bit with the reference
// recursion, and against x cos + y sin / y cos - x sin computed in real
// arithmetic (tolerance 2 rho units). The cycles per iteration are checked:
// 1 for the parallel engine, N/K = 4 for the serial one.
module tb_cbrm_pair;
  import cbrm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  localparam int N = 16, K = 4, FRAC = 7, NT = 128, NH = NT / 2;
  localparam longint A = alpha_q(NT), B = beta_q(NT);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       load, step;
  logic [6:0] x0, y0;
  logic       rdy2, done2, rdy1, done1;
  logic [15:0] ri2, rii2, ri1, rii1;
  real        max_err = 0.0;

  // The two tables, shared by both engines: N/K ports for the parallel
  // engine (ports 0 .. N/K-1) and one for the serial engine (port N/K).
  localparam int T = N / K;
  logic [T:0][2*K+1:0] la_i, la_ii;
  logic [T:0][15:0]    ld_i, ld_ii;
  conv_lut #(.K(K), .LUT_W(16), .PORTS(T + 1), .C_SELF(A), .C_CROSS(B)) lut_i (
    .addr(la_i), .data(ld_i));
  conv_lut #(.K(K), .LUT_W(16), .PORTS(T + 1), .C_SELF(A), .C_CROSS(-B)) lut_ii (
    .addr(la_ii), .data(ld_ii));

  cbrm_pair #(.IMPL(2)) dut2 (
    .clk, .rst_n, .load, .x0, .y0, .step, .ready(rdy2), .iter_done(done2),
    .lut_i_addr(la_i[T-1:0]), .lut_i_data(ld_i[T-1:0]),
    .lut_ii_addr(la_ii[T-1:0]), .lut_ii_data(ld_ii[T-1:0]),
    .rho_i(ri2), .rho_ii(rii2));
  cbrm_pair #(.IMPL(1)) dut1 (
    .clk, .rst_n, .load, .x0, .y0, .step, .ready(rdy1), .iter_done(done1),
    .lut_i_addr(la_i[T]), .lut_i_data(ld_i[T]),
    .lut_ii_addr(la_ii[T]), .lut_ii_data(ld_ii[T]),
    .rho_i(ri1), .rho_ii(rii1));

  task automatic compare(input string tag, input logic [15:0] ri, input logic [15:0] rii,
                         input longint ei, input longint eii, input int x, input int y, input int i);
    real th, wi, wii, gi, gii, err;
    th  = PI * i / NT;
    wi  = x * $cos(th) + y * $sin(th);
    wii = y * $cos(th) - x * $sin(th);
    gi  = real'(sext(longint'(ri), N)) / (2.0 ** FRAC);
    gii = real'(sext(longint'(rii), N)) / (2.0 ** FRAC);
    checks += 2;
    if (sext(longint'(ri), N) != ei || sext(longint'(rii), N) != eii) begin
      failures++;
      $display("FAIL %s exact x=%0d y=%0d i=%0d got %0d %0d exp %0d %0d", tag, x, y, i,
               $signed(ri), $signed(rii), ei, eii);
    end
    err = (gi > wi) ? gi - wi : wi - gi;
    if (((gii > wii) ? gii - wii : wii - gii) > err) err = (gii > wii) ? gii - wii : wii - gii;
    if (err > max_err) max_err = err;
    if (err > 2.0) begin
      failures++;
      $display("FAIL %s accuracy x=%0d y=%0d i=%0d err=%f", tag, x, y, i, err);
    end
  endtask

  task automatic run_pixel(input int x, input int y);
    longint ei, eii, ni, nii;
    int cyc;
    // load both engines
    @(posedge clk); #1;
    load = 1'b1; x0 = 7'(x); y0 = 7'(y);
    @(posedge clk); #1;
    load = 1'b0;
    ei = longint'(x) << FRAC; eii = longint'(y) << FRAC;
    // parallel engine: one step per cycle, check before each step
    for (int i = 0; i < NH; i++) begin
      compare("par", ri2, rii2, ei, eii, x, y, i);
      compare("ser", ri1, rii1, ei, eii, x, y, i);
      if (i == NH - 1) break;
      ni  = ref_step(ei, eii, A, B, N, K, 16);
      nii = ref_step(eii, ei, A, -B, N, K, 16);
      ei = ni; eii = nii;
      step = 1'b1;
      cyc = 0;
      // count cycles until the serial engine is ready again
      do begin
        @(posedge clk); #1;
        step = 1'b0;
        cyc++;
        if (cyc == 1) begin
          checks++;
          if (!rdy2 || sext(longint'(ri2), N) != ei) begin
            failures++; $display("FAIL par not done after one cycle");
          end
        end
      end while (!rdy1 && cyc < 100);
      checks++;
      if (cyc != N / K) begin failures++; $display("FAIL ser cycles %0d", cyc); end
      // keep the parallel engine in step: it already advanced once, so it
      // must not advance during the remaining serial cycles (step was low).
    end
  endtask

  initial begin
    load = 1'b0; step = 1'b0; x0 = '0; y0 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_pixel(0, 0);
    run_pixel(127, 127);
    run_pixel(127, 0);
    run_pixel(0, 127);
    repeat (60) run_pixel(int'($urandom_range(0, 127)), int'($urandom_range(0, 127)));
    $display("max |rho error| over all angles = %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
