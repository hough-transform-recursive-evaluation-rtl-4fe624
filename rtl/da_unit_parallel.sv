// da_unit_parallel: one CBRM evaluation step, implementation 2 (parallel).
//
// Computes rho_next = C_SELF * self + C_CROSS * cross, where both operands
// arrive in sign-magnitude form and the coefficients live only inside the
// Convolution-LUT (conv_lut), which sits outside the unit so that several
// units can share one table: the unit drives T read addresses and receives
// the T words in the same cycle. The N-bit magnitudes are cut into T = N/K
// blocks; all T blocks address the LUT at once, the T partial products are
// aligned by K*j places, reduced to two words by the 3:2 counter tree and
// added by one carry-propagate adder, then rounded to the rho format.
// Purely combinational: one full iteration per clock cycle, with a path of
// LUT + reduction tree + adder, as the architecture's delay model states.
// The block structure and reduction follow the architecture; word widths and
// rounding are this design's choices (see da_round_sat).
module da_unit_parallel #(
  parameter int N     = 16,
  parameter int K     = 4,
  parameter int LUT_W = 16
) (
  input  logic                       s_self,
  input  logic [N-1:0]               m_self,
  input  logic                       s_cross,
  input  logic [N-1:0]               m_cross,
  output logic [N/K-1:0][2*K+1:0]    lut_addr,   // one LUT read per block
  input  logic [N/K-1:0][LUT_W-1:0]  lut_data,
  output logic [N-1:0]               rho_next
);
  localparam int T  = N / K;
  localparam int LF = LUT_W - K - 2;
  localparam int SW = LUT_W + N - K;   // width of the aligned sum

  logic [SW-1:0]           ops  [T];
  logic [SW-1:0]           red_a, red_b;
  logic signed [SW-1:0]    total;

  for (genvar j = 0; j < T; j++) begin : g_blk
    assign lut_addr[j] = {s_self, s_cross, m_self[j*K +: K], m_cross[j*K +: K]};
    assign ops[j]      = SW'(signed'(lut_data[j])) << (j*K);
  end

  csa_reduce #(.M(T), .W(SW)) u_tree (.ops(ops), .out_a(red_a), .out_b(red_b));

  assign total = signed'(red_a + red_b);

  da_round_sat #(.N(N), .SW(SW), .LF(LF)) u_round (.s(total), .q(rho_next));

  initial assert (N % K == 0) else $error("N must be a multiple of K");
endmodule
