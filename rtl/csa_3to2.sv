// csa_3to2: one row of 3:2 carry-save adders (W full adders side by side).
//
// Three W-bit operands x, y, z are compressed into a sum row and a carry row
// with no carry propagation between bit positions: bit i of sum and carry is
// the full-adder sum and carry-out of x[i], y[i], z[i]. The carry row is
// returned at the weight of its inputs; it is worth twice that, so
// x + y + z = sum + 2 * carry. The caller does the shift. The design names
// 3:2 carry-save adders for its accumulation; building them from plain full
// adders is the obvious reading.
//
// Interface: x, y, z inputs, sum and carry outputs, all W bits.
// Timing: combinational, one full-adder delay.
module csa_3to2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (z[i]),
      .sum (sum[i]),
      .cout(carry[i])
    );
  end

endmodule
