// sm_recode: two's complement to sign-magnitude recoder.
//
// The rho registers of the CBRM engine hold two's complement values, so the
// partial products can simply be added. The Convolution-LUT, however, is
// addressed by magnitude bits plus the operand sign, so every value is recoded
// to sign-magnitude before each table access. The magnitude is N bits wide so
// that the most negative value -2^(N-1) is represented exactly; the N bits are
// then cut into t = N/K blocks of K bits.
// Purely combinational. The recoding step follows the architecture; the
// N-bit magnitude is this design's choice.
module sm_recode #(
  parameter int N = 16
) (
  input  logic [N-1:0] value,   // two's complement
  output logic         sign,    // 1 = negative
  output logic [N-1:0] mag      // |value|
);
  always_comb begin
    sign = value[N-1];
    mag  = sign ? (~value + N'(1)) : value;
  end
endmodule
