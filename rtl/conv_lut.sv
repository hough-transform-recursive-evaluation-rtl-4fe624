// conv_lut: Convolution-LUT of the distributed-arithmetic CBRM engine.
//
// For one K-bit block a of the operand that is being updated ("self") and the
// matching block b of the other operand ("cross"), plus the two operand signs,
// the table returns the signed partial product
//   word = (+-C_SELF) * a + (+-C_CROSS) * b
// as a LUT_W-bit two's complement number with LF = LUT_W - K - 2 fractional
// bits (K+1 integer bits cover |a|,|b| < 2^K times alpha+beta < 1.5). The
// address is {s_self, s_cross, a, b}: 2K+2 bits, i.e. the four sign columns
// of the k = 1 table extended to K-bit blocks. With N = LUT_W = 16 this is
// 16 words (32 bytes) for K = 1, 64 words for K = 2, 1024 words for K = 4.
// The contents are fixed for the whole transform (alpha, beta are constant),
// so they are computed at elaboration from the fixed-point coefficients.
// PORTS independent asynchronous read ports share the one table: a serial
// unit uses one, a parallel unit one per block, and several engines share a
// single table through their own groups of ports.
// The table organisation follows the architecture; the fractional format,
// rounding and the asynchronous read are this design's choices.
module conv_lut
  import cbrm_pkg::*;
#(
  parameter int     K       = 4,
  parameter int     LUT_W   = 16,
  parameter int     PORTS   = 1,
  parameter longint C_SELF  = alpha_q(128),   // alpha for dtheta = pi/128
  parameter longint C_CROSS = beta_q(128)     // beta  for dtheta = pi/128
) (
  input  logic [PORTS-1:0][2*K+1:0]   addr,   // per port {s_self, s_cross, a[K], b[K]}
  output logic [PORTS-1:0][LUT_W-1:0] data    // per port, two's complement
);
  localparam int LF    = LUT_W - K - 2;
  localparam int DEPTH = 1 << (2*K+2);

  logic signed [LUT_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      rom[i] = LUT_W'(lut_entry(C_SELF, C_CROSS, i[2*K+1], i[2*K],
                                longint'(i[2*K-1:K]), longint'(i[K-1:0]), LF));
    end
  end

  for (genvar p = 0; p < PORTS; p++) begin : g_port
    assign data[p] = rom[addr[p]];
  end
endmodule
