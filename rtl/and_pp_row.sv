// and_pp_row: exact partial product row of a conventional AND-array
// multiplier.
//
// Each bit of the multiplicand B is ANDed with one multiplier bit, so the row
// is B when the bit is 1 and zero otherwise. The decoder-based multiplier uses
// such rows for its most significant multiplier bits (a7 and a6 in the 8-bit
// configuration) so that no approximation error reaches the top of the
// product. The row is at weight 1 here; the parent shifts it to the weight of
// its multiplier bit.
//
// Interface: a_bit is the multiplier bit, b the N-bit multiplicand, pp the
// N-bit row. Timing: combinational.
module and_pp_row #(
  parameter int unsigned N = 8
) (
  input  logic         a_bit,
  input  logic [N-1:0] b,
  output logic [N-1:0] pp
);

  assign pp = b & {N{a_bit}};

endmodule
