// cbrm_pair: crossed CBRM evaluation of rho_I and rho_II (functional
// architecture of the engine: two DA units closing a loop through registers).
//
// For one pixel (x, y) and the angles theta_i = i * dtheta,
//   rho_I(i)  = x cos theta_i + y sin theta_i      (theta in [0, pi/2))
//   rho_II(i) = y cos theta_i - x sin theta_i      (= rho at theta_i + pi/2)
// and with alpha = cos dtheta, beta = sin dtheta both follow one recursion
//   rho_I(i+1)  = alpha * rho_I(i)  + beta * rho_II(i)
//   rho_II(i+1) = alpha * rho_II(i) - beta * rho_I(i)
// started from rho_I(0) = x, rho_II(0) = y. Each register feeds a
// two's-complement-to-sign-magnitude recoder; unit I uses rho_I as "self" and
// rho_II as "cross" with LUT coefficients (alpha, beta), unit II the other way
// round with (alpha, -beta), dtheta = pi / N_THETA. The coefficients live
// only in the two Convolution-LUTs, which sit outside the pair so that one
// multi-port table of each kind serves every engine: the pair drives
// P = N/K (IMPL = 2) or P = 1 (IMPL = 1) read addresses into each table and
// gets the words back in the same cycle.
//
// IMPL = 2 uses da_unit_parallel: one iteration per clock, step is accepted
// every cycle. IMPL = 1 uses da_unit_serial: an iteration takes N/K cycles and
// ready is low meanwhile. load (only while ready) writes x and y, scaled to
// FRAC fractional bits, into the registers; step (only while ready) performs
// one iteration. iter_done is high in the cycle whose clock edge writes the
// new values. load wins over step.
// The crossed recursion and the LUT-based units follow the architecture; the
// sign of the beta term of rho_II is taken from the definition of rho_II (a
// rotation), and the fixed-point format and handshake are this design's.
module cbrm_pair #(
  parameter int N     = 16,
  parameter int K     = 4,
  parameter int LUT_W = 16,
  parameter int FRAC  = 7,
  parameter int CW    = 7,
  parameter int IMPL  = 2,
  localparam int P    = (IMPL == 1) ? 1 : N / K
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [CW-1:0] x0,
  input  logic [CW-1:0] y0,
  input  logic          step,
  output logic          ready,
  output logic          iter_done,
  output logic [P-1:0][2*K+1:0]   lut_i_addr,    // table with (alpha, beta)
  input  logic [P-1:0][LUT_W-1:0] lut_i_data,
  output logic [P-1:0][2*K+1:0]   lut_ii_addr,   // table with (alpha, -beta)
  input  logic [P-1:0][LUT_W-1:0] lut_ii_data,
  output logic [N-1:0]  rho_i,     // two's complement, FRAC fractional bits
  output logic [N-1:0]  rho_ii
);
  logic         s_i, s_ii;
  logic [N-1:0] m_i, m_ii;
  logic [N-1:0] nxt_i, nxt_ii;

  sm_recode #(.N(N)) u_rec_i  (.value(rho_i),  .sign(s_i),  .mag(m_i));
  sm_recode #(.N(N)) u_rec_ii (.value(rho_ii), .sign(s_ii), .mag(m_ii));

  if (IMPL == 1) begin : g_serial
    logic busy_i, busy_ii, done_i, done_ii;
    da_unit_serial #(.N(N), .K(K), .LUT_W(LUT_W)) u_unit_i (
      .clk, .rst_n, .start(step && !load),
      .s_self(s_i), .m_self(m_i), .s_cross(s_ii), .m_cross(m_ii),
      .lut_addr(lut_i_addr[0]), .lut_data(lut_i_data[0]),
      .busy(busy_i), .done(done_i), .rho_next(nxt_i));
    da_unit_serial #(.N(N), .K(K), .LUT_W(LUT_W)) u_unit_ii (
      .clk, .rst_n, .start(step && !load),
      .s_self(s_ii), .m_self(m_ii), .s_cross(s_i), .m_cross(m_i),
      .lut_addr(lut_ii_addr[0]), .lut_data(lut_ii_data[0]),
      .busy(busy_ii), .done(done_ii), .rho_next(nxt_ii));
    assign ready     = !busy_i;
    assign iter_done = done_i;
    // Both units run in lock step.
    always_ff @(posedge clk) begin
      assert (!rst_n || (busy_i == busy_ii && done_i == done_ii));
    end
  end else begin : g_parallel
    da_unit_parallel #(.N(N), .K(K), .LUT_W(LUT_W)) u_unit_i (
      .s_self(s_i), .m_self(m_i), .s_cross(s_ii), .m_cross(m_ii),
      .lut_addr(lut_i_addr), .lut_data(lut_i_data), .rho_next(nxt_i));
    da_unit_parallel #(.N(N), .K(K), .LUT_W(LUT_W)) u_unit_ii (
      .s_self(s_ii), .m_self(m_ii), .s_cross(s_i), .m_cross(m_i),
      .lut_addr(lut_ii_addr), .lut_data(lut_ii_data), .rho_next(nxt_ii));
    assign ready     = 1'b1;
    assign iter_done = step && !load;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rho_i  <= '0;
      rho_ii <= '0;
    end else if (load) begin
      rho_i  <= N'(x0) << FRAC;
      rho_ii <= N'(y0) << FRAC;
    end else if (iter_done) begin
      rho_i  <= nxt_i;
      rho_ii <= nxt_ii;
    end
  end

  always_ff @(posedge clk) begin
    assert (!rst_n || !((load || step) && !ready)) else $error("load/step while busy");
  end

  initial assert (CW + FRAC < N) else $error("coordinates do not fit the rho format");
endmodule
