// tb_conv_lut: checks every word of the Convolution-LUT against a real-valued
// model, for K = 4 (default coefficients, dtheta = pi/128) and for the
// bit-serial table K = 1 with dtheta = pi/4, where it also checks the
// sign-column structure: 0, +-beta, +-alpha, +-alpha+-beta.
module tb_conv_lut;
  import cbrm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  localparam longint A4 = alpha_q(128), B4 = beta_q(128);
  localparam longint A1 = alpha_q(4),   B1 = beta_q(4);

  logic [0:0][9:0]  addr4;
  logic [0:0][15:0] data4;
  logic [1:0][3:0]  addr1;
  logic [1:0][15:0] data1;

  conv_lut #(.K(4), .LUT_W(16), .PORTS(1)) dut4 (.addr(addr4), .data(data4));
  conv_lut #(.K(1), .LUT_W(16), .PORTS(2), .C_SELF(A1), .C_CROSS(B1)) dut1 (.addr(addr1), .data(data1));

  initial begin
    longint e;
    real    ra, rb, want;
    #1;
    for (int i = 0; i < 1024; i++) begin
      addr4[0] = 10'(i); #1;
      e = ref_entry(A4, B4, i[9], i[8], longint'(i[7:4]), longint'(i[3:0]), 10);
      checks++;
      if (longint'($signed(data4[0])) != e) begin
        failures++;
        $display("FAIL K=4 addr=%0h got=%0d exp=%0d", i, $signed(data4[0]), e);
      end
    end
    // K = 1: LF = 13; both ports read the same table.
    ra = $cos(PI / 4); rb = $sin(PI / 4);
    for (int i = 0; i < 16; i++) begin
      addr1[0] = 4'(i); addr1[1] = 4'(15 - i); #1;
      want = (i[3] ? -ra : ra) * i[1] + (i[2] ? -rb : rb) * i[0];
      checks++;
      if (real'($signed(data1[0])) / 8192.0 - want > 1.0 / 8192.0 || want - real'($signed(data1[0])) / 8192.0 > 1.0 / 8192.0) begin
        failures++;
        $display("FAIL K=1 addr=%0h got=%0d want=%f", i, $signed(data1[0]), want);
      end
      e = ref_entry(A1, B1, i[3] == 1'b0 ? 1'b1 : 1'b0, i[2] == 1'b0 ? 1'b1 : 1'b0,
                    longint'(i[1] == 1'b0), longint'(i[0] == 1'b0), 13);
      checks++;
      if (longint'($signed(data1[1])) != e) begin
        failures++;
        $display("FAIL K=1 port1 addr=%0h got=%0d exp=%0d", 15 - i, $signed(data1[1]), e);
      end
    end
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
