// debam_mult: decoder-based approximate unsigned multiplier (DeBAM), N x N ->
// 2N bits, 8 x 8 -> 16 by default.
//
// Three stages, as in the design it follows:
//   1. debam_ppg builds the partial product rows. Pairs of low multiplier
//      bits drive 2-bit decoders that output 0, B, 2B or B|2B (the last one
//      standing in for 3B); the EXACT_BITS top multiplier bits use exact AND
//      rows. For N = 8 that is 5 rows instead of 8.
//   2. debam_accumulator reduces the rows to two with 3:2 carry-save adders.
//   3. rca, a ripple carry adder, adds the two rows into the product p.
// The only error source is the OR in the decoders for the code 11, so p is
// never above the exact product a*b and equals it whenever no low bit pair of
// a is 11. The carry out of the final adder is always zero, since
// p <= a*b < 2^(2N); an immediate assertion checks this in simulation.
// The order of the carry-save chain, the carry-in of the final adder (tied
// to 0) and the parameterisation in N are this design's own choices.
//
// Interface: a (multiplier, selects the decoders), b (multiplicand), p
// (approximate product). Timing: purely combinational; no clock or reset.
module debam_mult
  import debam_pkg::*;
#(
  parameter int unsigned N          = DEBAM_N,
  parameter int unsigned EXACT_BITS = DEBAM_EXACT_BITS
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned ROWS = (N - EXACT_BITS) / 2 + EXACT_BITS;

  logic [ROWS-1:0][2*N-1:0] rows;
  logic [2*N-1:0]           sum_row;
  logic [2*N-1:0]           carry_row;
  logic                     rca_cout;

  debam_ppg #(.N(N), .EXACT_BITS(EXACT_BITS)) u_ppg (
    .a   (a),
    .b   (b),
    .rows(rows)
  );

  debam_accumulator #(.ROWS(ROWS), .W(2*N)) u_acc (
    .rows     (rows),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  rca #(.W(2*N)) u_rca (
    .a   (sum_row),
    .b   (carry_row),
    .cin (1'b0),
    .sum (p),
    .cout(rca_cout)
  );

  // The approximate product never exceeds a*b, so the final adder cannot
  // overflow 2N bits.
  always_comb begin
    assert (rca_cout == 1'b0)
      else $error("debam_mult: final adder overflowed");
  end

endmodule
