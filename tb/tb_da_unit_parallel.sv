// tb_da_unit_parallel: checks one parallel DA evaluation step against the
// reference step model, for the default 16-bit / 4-bit-block unit, a bit-serial
// table (K = 1, 16 blocks through the 3:2 tree), 16-bit units with K = 2 and
// K = 8 (a 2^18-word table) and a 32-bit / K = 8 unit, with random operands of
// both signs and the extreme values.
module tb_da_unit_parallel;
  import cbrm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  localparam longint A = alpha_q(128), B = beta_q(128);
  localparam longint A7 = alpha_q(72), B7 = beta_q(72);

  logic [15:0] x16, y16, r4, r1, r2, r8s;
  logic        sx16, sy16;
  logic [15:0] mx16, my16;
  logic [31:0] x32, y32, r8, mx32, my32;
  logic        sx32, sy32;

  sm_recode #(.N(16)) rx16 (.value(x16), .sign(sx16), .mag(mx16));
  sm_recode #(.N(16)) ry16 (.value(y16), .sign(sy16), .mag(my16));
  sm_recode #(.N(32)) rx32 (.value(x32), .sign(sx32), .mag(mx32));
  sm_recode #(.N(32)) ry32 (.value(y32), .sign(sy32), .mag(my32));

  logic [3:0][9:0] a_dut4;
  logic [3:0][15:0] d_dut4;
  conv_lut #(.K(4), .LUT_W(16), .PORTS(4), .C_SELF(A), .C_CROSS(B)) lut_dut4 (
    .addr(a_dut4), .data(d_dut4));
  da_unit_parallel #(.N(16), .K(4), .LUT_W(16)) dut4 (
    .s_self(sx16), .m_self(mx16), .s_cross(sy16), .m_cross(my16),
    .lut_addr(a_dut4), .lut_data(d_dut4), .rho_next(r4));
  logic [15:0][3:0] a_dut1;
  logic [15:0][15:0] d_dut1;
  conv_lut #(.K(1), .LUT_W(16), .PORTS(16), .C_SELF(A), .C_CROSS(-B)) lut_dut1 (
    .addr(a_dut1), .data(d_dut1));
  da_unit_parallel #(.N(16), .K(1), .LUT_W(16)) dut1 (
    .s_self(sx16), .m_self(mx16), .s_cross(sy16), .m_cross(my16),
    .lut_addr(a_dut1), .lut_data(d_dut1), .rho_next(r1));
  logic [7:0][5:0] a_dut2;
  logic [7:0][15:0] d_dut2;
  conv_lut #(.K(2), .LUT_W(16), .PORTS(8), .C_SELF(A), .C_CROSS(B)) lut_dut2 (
    .addr(a_dut2), .data(d_dut2));
  da_unit_parallel #(.N(16), .K(2), .LUT_W(16)) dut2 (
    .s_self(sx16), .m_self(mx16), .s_cross(sy16), .m_cross(my16),
    .lut_addr(a_dut2), .lut_data(d_dut2), .rho_next(r2));
  logic [1:0][17:0] a_dut8s;
  logic [1:0][15:0] d_dut8s;
  conv_lut #(.K(8), .LUT_W(16), .PORTS(2), .C_SELF(A), .C_CROSS(B)) lut_dut8s (
    .addr(a_dut8s), .data(d_dut8s));
  da_unit_parallel #(.N(16), .K(8), .LUT_W(16)) dut8s (
    .s_self(sx16), .m_self(mx16), .s_cross(sy16), .m_cross(my16),
    .lut_addr(a_dut8s), .lut_data(d_dut8s), .rho_next(r8s));
  logic [3:0][17:0] a_dut8;
  logic [3:0][31:0] d_dut8;
  conv_lut #(.K(8), .LUT_W(32), .PORTS(4), .C_SELF(A7), .C_CROSS(B7)) lut_dut8 (
    .addr(a_dut8), .data(d_dut8));
  da_unit_parallel #(.N(32), .K(8), .LUT_W(32)) dut8 (
    .s_self(sx32), .m_self(mx32), .s_cross(sy32), .m_cross(my32),
    .lut_addr(a_dut8), .lut_data(d_dut8), .rho_next(r8));

  task automatic apply(input logic [15:0] a, input logic [15:0] b,
                       input logic [31:0] c, input logic [31:0] d);
    longint e4, e1, e8, e2, e8s;
    x16 = a; y16 = b; x32 = c; y32 = d; #1;
    e4 = ref_step(longint'($signed(a)), longint'($signed(b)), A, B, 16, 4, 16);
    e1 = ref_step(longint'($signed(a)), longint'($signed(b)), A, -B, 16, 1, 16);
    e8 = ref_step(longint'($signed(c)), longint'($signed(d)), A7, B7, 32, 8, 32);
    e2 = ref_step(longint'($signed(a)), longint'($signed(b)), A, B, 16, 2, 16);
    e8s = ref_step(longint'($signed(a)), longint'($signed(b)), A, B, 16, 8, 16);
    checks += 5;
    if (sext(longint'(r2), 16) != e2) begin failures++; $display("FAIL K=2 got %0d exp %0d", $signed(r2), e2); end
    if (sext(longint'(r8s), 16) != e8s) begin failures++; $display("FAIL 16-bit K=8 got %0d exp %0d", $signed(r8s), e8s); end
    if (sext(longint'(r4), 16) != e4) begin failures++; $display("FAIL K=4 %0d %0d got %0d exp %0d", $signed(a), $signed(b), $signed(r4), e4); end
    if (sext(longint'(r1), 16) != e1) begin failures++; $display("FAIL K=1 %0d %0d got %0d exp %0d", $signed(a), $signed(b), $signed(r1), e1); end
    if (sext(longint'(r8), 32) != e8) begin failures++; $display("FAIL K=8 got %0d exp %0d", $signed(r8), e8); end
  endtask

  initial begin
    apply(16'h0000, 16'h0000, 32'h0, 32'h0);
    apply(16'h7FFF, 16'h7FFF, 32'h7FFFFFFF, 32'h7FFFFFFF);
    apply(16'h8000, 16'h8000, 32'h80000000, 32'h80000000);
    apply(16'h8000, 16'h7FFF, 32'h80000000, 32'h7FFFFFFF);
    apply(16'd3200, 16'hF000, 32'd1000000, -32'd5);
    repeat (3000) apply(16'($urandom), 16'($urandom), $urandom, $urandom);
    // Values in the range a pixel's rho actually takes (|rho| < 181 * 2^7).
    repeat (3000) apply(16'($urandom_range(0, 46336) - 23168), 16'($urandom_range(0, 46336) - 23168),
                        $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
