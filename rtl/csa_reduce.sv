// csa_reduce: reduction structure of implementation 2 (3:2 counter tree).
//
// M operands of W bits are reduced to two, exactly as the partial-product
// reduction of a multiplier: at every level the operands are taken three at a
// time through a row of 3:2 counters (csa32), giving two words per group, and
// the one or two left over pass straight to the next level. After
// ceil(log1.5(M/2)) levels two words remain, whose sum (mod 2^W) equals the
// sum of all inputs; a single carry-propagate adder then finishes the job.
// With M = 1 the second output is zero. Purely combinational.
// The use of 3:2 counters follows the architecture; the grouping order is
// this design's choice.
module csa_reduce #(
  parameter int M = 4,
  parameter int W = 16
) (
  input  logic [W-1:0] ops [M],
  output logic [W-1:0] out_a,
  output logic [W-1:0] out_b
);
  // Number of operands left after a given number of levels.
  function automatic int count_at(input int level);
    int c;
    c = M;
    for (int l = 0; l < level; l++) begin
      if (c > 2) c = 2 * (c / 3) + (c % 3);
    end
    return c;
  endfunction

  function automatic int num_levels();
    int l;
    l = 0;
    while (count_at(l) > 2) l++;
    return l;
  endfunction

  localparam int LEVELS = num_levels();
  localparam int MW     = (M < 2) ? 2 : M;

  logic [W-1:0] lvl0 [MW];

  for (genvar i = 0; i < MW; i++) begin : g_in
    if (i < M) begin : g_op
      assign lvl0[i] = ops[i];
    end else begin : g_zero
      assign lvl0[i] = '0;
    end
  end

  // Each level owns its output words; level l reads level l-1.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int CIN  = count_at(l);
    localparam int GRP  = CIN / 3;
    localparam int COUT = count_at(l + 1);
    logic [W-1:0] vin [MW];
    logic [W-1:0] v   [MW];
    if (l == 0) begin : g_first
      assign vin = lvl0;
    end else begin : g_next
      assign vin = g_level[l-1].v;
    end
    for (genvar g = 0; g < GRP; g++) begin : g_grp
      csa32 #(.W(W)) u_csa (
        .x    (vin[3*g]),
        .y    (vin[3*g+1]),
        .z    (vin[3*g+2]),
        .sum  (v[2*g]),
        .carry(v[2*g+1])
      );
    end
    for (genvar r = 0; r < CIN - 3*GRP; r++) begin : g_pass
      assign v[2*GRP + r] = vin[3*GRP + r];
    end
    for (genvar u = COUT; u < MW; u++) begin : g_unused
      assign v[u] = '0;
    end
  end

  if (LEVELS == 0) begin : g_out0
    assign out_a = lvl0[0];
    assign out_b = lvl0[1];
  end else begin : g_outn
    assign out_a = g_level[LEVELS-1].v[0];
    assign out_b = g_level[LEVELS-1].v[1];
  end
endmodule
