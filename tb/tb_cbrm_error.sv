// tb_cbrm_error: accuracy workload of the recursion with 32-bit data.
// Three crossed-recursion engines (N = LUT_W = 32, K = 4, parallel units,
// 23 fractional bits) run with angle steps pi/4, pi/72 and pi/360. Each is
// loaded with random pixels of a 128 x 128 image and iterated 36 times; the
// largest absolute error of rho_I and rho_II against real-valued
// x cos + y sin / y cos - x sin is reported after 12 and after 36 computed
// points. Every value is also compared bit for bit with the reference step
// model, and the errors must stay below 1e-4 (12 points) and 3e-4 (36 points)
// rho units.
module tb_cbrm_error;
  import cbrm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  localparam int N = 32, K = 4, FRAC = 23;
  localparam int NT [3] = '{4, 72, 360};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        load, step;
  logic [6:0]  x0, y0;
  logic [31:0] ri [3], rii [3];
  real         max12 [3], max36 [3];

  for (genvar g = 0; g < 3; g++) begin : g_eng
    logic [N/K-1:0][2*K+1:0] la_i, la_ii;
    logic [N/K-1:0][31:0]    ld_i, ld_ii;
    conv_lut #(.K(K), .LUT_W(32), .PORTS(N/K),
               .C_SELF(alpha_q(NT[g])), .C_CROSS(beta_q(NT[g]))) u_lut_i (
      .addr(la_i), .data(ld_i));
    conv_lut #(.K(K), .LUT_W(32), .PORTS(N/K),
               .C_SELF(alpha_q(NT[g])), .C_CROSS(-beta_q(NT[g]))) u_lut_ii (
      .addr(la_ii), .data(ld_ii));
    cbrm_pair #(.N(N), .K(K), .LUT_W(32), .FRAC(FRAC), .IMPL(2)) u_pair (
      .clk, .rst_n, .load, .x0, .y0, .step, .ready(), .iter_done(),
      .lut_i_addr(la_i), .lut_i_data(ld_i), .lut_ii_addr(la_ii), .lut_ii_data(ld_ii),
      .rho_i(ri[g]), .rho_ii(rii[g]));
  end

  task automatic run_pixel(input int x, input int y);
    longint ei [3], eii [3], ni, nii;
    real th, wi, wii, err, e2;
    @(posedge clk); #1;
    load = 1'b1; x0 = 7'(x); y0 = 7'(y);
    @(posedge clk); #1;
    load = 1'b0;
    for (int g = 0; g < 3; g++) begin
      ei[g] = longint'(x) << FRAC; eii[g] = longint'(y) << FRAC;
    end
    for (int i = 0; i <= 36; i++) begin
      for (int g = 0; g < 3; g++) begin
        th  = PI * i / NT[g];
        wi  = x * $cos(th) + y * $sin(th);
        wii = y * $cos(th) - x * $sin(th);
        err = real'(sext(longint'(ri[g]), N)) / (2.0 ** FRAC) - wi;
        e2  = real'(sext(longint'(rii[g]), N)) / (2.0 ** FRAC) - wii;
        if (err < 0) err = -err;
        if (e2 < 0) e2 = -e2;
        if (e2 > err) err = e2;
        if (i <= 12 && err > max12[g]) max12[g] = err;
        if (err > max36[g]) max36[g] = err;
        checks++;
        if (sext(longint'(ri[g]), N) != ei[g] || sext(longint'(rii[g]), N) != eii[g]) begin
          failures++;
          $display("FAIL exact dtheta=pi/%0d i=%0d", NT[g], i);
        end
        ni  = ref_step(ei[g], eii[g], alpha_q(NT[g]), beta_q(NT[g]), N, K, 32);
        nii = ref_step(eii[g], ei[g], alpha_q(NT[g]), -beta_q(NT[g]), N, K, 32);
        ei[g] = ni; eii[g] = nii;
      end
      step = 1'b1;
      @(posedge clk); #1;
      step = 1'b0;
    end
  endtask

  initial begin
    load = 0; step = 0; x0 = 0; y0 = 0;
    foreach (max12[g]) begin max12[g] = 0.0; max36[g] = 0.0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_pixel(127, 127);
    repeat (100) run_pixel(int'($urandom_range(0, 127)), int'($urandom_range(0, 127)));
    for (int g = 0; g < 3; g++) begin
      $display("dtheta = pi/%0d: max |error| %e after 12 points, %e after 36 points",
               NT[g], max12[g], max36[g]);
      checks += 2;
      if (max12[g] > 1e-4) failures++;
      if (max36[g] > 3e-4) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
