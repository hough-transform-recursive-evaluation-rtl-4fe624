// csa32: one row of 3:2 counters (full adders without carry propagation).
//
// Three W-bit operands are compressed into a sum word and a carry word with
// x + y + z == sum + carry (mod 2^W). The carry word is already shifted left
// by one place. Purely combinational; used by the reduction tree.
module csa32 #(
  parameter int W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-2:0] maj;   // the carry out of the top bit falls outside W
  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    carry = {maj, 1'b0};
  end
endmodule
