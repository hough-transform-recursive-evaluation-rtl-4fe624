// da_unit_serial: one CBRM evaluation step, implementation 1 (serial).
//
// Same arithmetic as da_unit_parallel, but the T = N/K blocks go through a
// single read port of the Convolution-LUT (conv_lut, outside the unit; the
// word must come back in the same cycle) and a single adder one after the
// other, most
// significant block first: acc = (acc << K) + word_j. An iteration therefore
// takes T clock cycles (T = N for the bit-serial case K = 1), each cycle
// holding one LUT access and one addition.
// Interface: pulse start for one cycle with the operands valid; keep the
// operands stable until done. done is high in the T-th cycle (the start cycle
// counts as the first) and rho_next is valid while done is high, so a caller
// can register the result and start the next iteration in the next cycle.
// start is ignored while an iteration is running.
// The serial block order follows the architecture; the MSB-first order and
// the handshake are this design's choices.
module da_unit_serial #(
  parameter int N     = 16,
  parameter int K     = 4,
  parameter int LUT_W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         s_self,
  input  logic [N-1:0] m_self,
  input  logic         s_cross,
  input  logic [N-1:0] m_cross,
  output logic [2*K+1:0]   lut_addr,
  input  logic [LUT_W-1:0] lut_data,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] rho_next
);
  localparam int T  = N / K;
  localparam int LF = LUT_W - K - 2;
  localparam int SW = LUT_W + N - K;
  localparam int JW = (T > 1) ? $clog2(T) : 1;

  logic [JW-1:0]           j_q, j_cur;
  logic                    active;
  logic signed [SW-1:0]    acc_q, sum;

  always_comb begin
    active   = start || busy;
    j_cur    = busy ? j_q : JW'(T - 1);
    lut_addr = {s_self, s_cross, m_self[j_cur*K +: K], m_cross[j_cur*K +: K]};
    sum      = (busy ? (acc_q <<< K) : '0) + SW'(signed'(lut_data));
    done     = active && (j_cur == '0);
  end

  da_round_sat #(.N(N), .SW(SW), .LF(LF)) u_round (.s(sum), .q(rho_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      j_q   <= '0;
      acc_q <= '0;
    end else if (active) begin
      acc_q <= sum;
      busy  <= !done;
      j_q   <= j_cur - JW'(1);
    end
  end

  initial assert (N % K == 0) else $error("N must be a multiple of K");
endmodule
