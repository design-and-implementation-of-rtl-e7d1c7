// debam_accumulator: carry-save accumulation stage of the decoder-based
// approximate multiplier.
//
// ROWS partial product rows of W bits are reduced to two rows (a sum row and
// a carry row) by a chain of ROWS-2 rows of 3:2 carry-save adders. The first
// CSA takes rows 0, 1 and 2; every following CSA takes the previous sum row,
// the previous carry row shifted left by one, and the next partial product
// row. With the default five rows this is three CSA rows. Reducing five rows
// to two with 3:2 carry-save adders follows the published design; the chain
// order is this implementation's choice. Everything is kept
// modulo 2^W: the carries pushed out at the top are dropped, which is exact
// whenever the true total fits in W bits, as a product of two W/2-bit
// operands always does.
//
// Interface: rows (ROWS x W bits, packed), sum_row and carry_row (W bits);
// sum_row + carry_row equals the sum of all rows modulo 2^W. The carry row is
// already at its weight. Timing: combinational, ROWS-2 full-adder delays.
module debam_accumulator #(
  parameter int unsigned ROWS = 5,
  parameter int unsigned W    = 16
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum_row,
  output logic [W-1:0]           carry_row
);

  if (ROWS < 2) begin : g_bad_cfg
    $error("debam_accumulator: ROWS must be at least 2");
  end

  // s[i] and c[i] are the two rows left after CSA stage i (stage 0 = inputs).
  logic [ROWS-2:0][W-1:0] s;
  logic [ROWS-2:0][W-1:0] c;

  assign s[0] = rows[0];
  assign c[0] = rows[1];

  for (genvar i = 0; i < ROWS - 2; i++) begin : g_csa
    logic [W-1:0] carry_raw;

    csa_3to2 #(.W(W)) u_csa (
      .x    (s[i]),
      .y    (c[i]),
      .z    (rows[i+2]),
      .sum  (s[i+1]),
      .carry(carry_raw)
    );

    assign c[i+1] = {carry_raw[W-2:0], 1'b0};
  end

  assign sum_row   = s[ROWS-2];
  assign carry_row = c[ROWS-2];

endmodule
