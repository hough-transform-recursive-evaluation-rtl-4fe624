// tb_sm_recode: checks the two's complement to sign-magnitude recoder on the
// extreme values and on random values, for N = 16 and N = 12.
module tb_sm_recode;
  int checks = 0, failures = 0;
  logic [15:0] v16, m16;  logic s16;
  logic [11:0] v12, m12;  logic s12;

  sm_recode #(.N(16)) dut16 (.value(v16), .sign(s16), .mag(m16));
  sm_recode #(.N(12)) dut12 (.value(v12), .sign(s12), .mag(m12));

  task automatic check16(input logic [15:0] v);
    int iv, exp_m;
    v16 = v; #1;
    iv = int'($signed(v));
    exp_m = iv < 0 ? -iv : iv;
    checks++;
    if (s16 !== (iv < 0) || int'(m16) != exp_m) begin
      failures++;
      $display("FAIL v=%0d sign=%0b mag=%0d", iv, s16, m16);
    end
  endtask

  task automatic check12(input logic [11:0] v);
    int iv, exp_m;
    v12 = v; #1;
    iv = int'($signed(v));
    exp_m = iv < 0 ? -iv : iv;
    checks++;
    if (s12 !== (iv < 0) || int'(m12) != exp_m) begin
      failures++;
      $display("FAIL12 v=%0d sign=%0b mag=%0d", iv, s12, m12);
    end
  endtask

  initial begin
    check16(16'h0000); check16(16'h0001); check16(16'hFFFF);
    check16(16'h7FFF); check16(16'h8000); check16(16'h8001);
    check12(12'h800); check12(12'h7FF); check12(12'hFFF);
    repeat (2000) begin
      check16(16'($urandom));
      check12(12'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
