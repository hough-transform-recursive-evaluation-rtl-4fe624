// da_round_sat: final scaling of a distributed-arithmetic sum.
//
// The block partial products carry LF fractional bits. This helper removes
// them with round-half-up ((s + 2^(LF-1)) >>> LF) and saturates the result to
// the N-bit two's complement range of the rho registers. A rotation never
// grows a value, so saturation only acts on the rounding excess of values at
// the very edge of the range. Purely combinational; rounding and saturation
// are this design's choices.
module da_round_sat #(
  parameter int N  = 16,
  parameter int SW = 28,
  parameter int LF = 10
) (
  input  logic signed [SW-1:0] s,
  output logic        [N-1:0]  q
);
  localparam int RW = SW - LF + 1;
  logic signed [SW:0]   biased;
  logic signed [RW-1:0] r;
  localparam logic signed [RW-1:0] QMAX = RW'((longint'(1) <<< (N-1)) - 1);
  localparam logic signed [RW-1:0] QMIN = RW'(-(longint'(1) <<< (N-1)));

  always_comb begin
    biased = (SW+1)'(s) + (SW+1)'(longint'(1) <<< (LF-1));
    r      = RW'(biased >>> LF);
    if (r > QMAX)      q = QMAX[N-1:0];
    else if (r < QMIN) q = QMIN[N-1:0];
    else               q = r[N-1:0];
  end
endmodule
