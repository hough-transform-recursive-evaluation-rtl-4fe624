// tb_da_unit_serial: checks the serial DA unit: the result of every
// iteration against the reference step model, and that an iteration takes
// exactly N/K cycles (16 for the bit-serial K = 1 unit, 4 for K = 4), with
// back-to-back iterations and idle gaps between them.
module tb_da_unit_serial;
  import cbrm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  localparam longint A = alpha_q(128), B = beta_q(128);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] x, y, mx, my, r4, r1;
  logic        sx, sy, start;
  logic        busy4, done4, busy1, done1;

  sm_recode #(.N(16)) rx (.value(x), .sign(sx), .mag(mx));
  sm_recode #(.N(16)) ry (.value(y), .sign(sy), .mag(my));

  logic [9:0]  a4;
  logic [15:0] d4;
  logic [3:0]  a1;
  logic [15:0] d1;
  conv_lut #(.K(4), .LUT_W(16), .PORTS(1), .C_SELF(A), .C_CROSS(B)) lut4 (.addr(a4), .data(d4));
  conv_lut #(.K(1), .LUT_W(16), .PORTS(1), .C_SELF(A), .C_CROSS(-B)) lut1 (.addr(a1), .data(d1));

  da_unit_serial #(.N(16), .K(4)) dut4 (
    .clk, .rst_n, .start, .s_self(sx), .m_self(mx), .s_cross(sy), .m_cross(my),
    .lut_addr(a4), .lut_data(d4), .busy(busy4), .done(done4), .rho_next(r4));
  da_unit_serial #(.N(16), .K(1)) dut1 (
    .clk, .rst_n, .start, .s_self(sx), .m_self(mx), .s_cross(sy), .m_cross(my),
    .lut_addr(a1), .lut_data(d1), .busy(busy1), .done(done1), .rho_next(r1));

  // Run one iteration on both units (they start together; K = 1 ends last).
  task automatic run(input logic [15:0] a, input logic [15:0] b);
    longint e4, e1;
    int     cyc;
    bit     got4;
    x = a; y = b; start = 1'b1;
    e4 = ref_step(longint'($signed(a)), longint'($signed(b)), A, B, 16, 4, 16);
    e1 = ref_step(longint'($signed(a)), longint'($signed(b)), A, -B, 16, 1, 16);
    cyc = 0; got4 = 0;
    forever begin
      cyc++;
      #1;
      if (done4) begin
        checks += 2;
        if (cyc != 4) begin failures++; $display("FAIL K=4 latency %0d", cyc); end
        if (sext(longint'(r4), 16) != e4) begin failures++; $display("FAIL K=4 got %0d exp %0d", $signed(r4), e4); end
        got4 = 1;
      end
      if (done1) begin
        checks += 3;
        if (cyc != 16) begin failures++; $display("FAIL K=1 latency %0d", cyc); end
        if (sext(longint'(r1), 16) != e1) begin failures++; $display("FAIL K=1 got %0d exp %0d", $signed(r1), e1); end
        if (!got4) failures++;
        @(posedge clk); #1;
        start = 1'b0;
        break;
      end
      @(posedge clk); #1;
      start = 1'b0;
    end
  endtask

  initial begin
    start = 1'b0; x = '0; y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    run(16'h7FFF, 16'h8000);
    run(16'd0, 16'd0);
    repeat (500) begin
      run(16'($urandom), 16'($urandom));
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
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
