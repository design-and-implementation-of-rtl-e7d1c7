// debam_ppg: partial product generation stage of the decoder-based
// approximate multiplier.
//
// The N-bit multiplier A is cut in two parts. Its low N-EXACT_BITS bits are
// taken in 2-bit groups {a[2k+1], a[2k]}; each group drives a debam_decoder
// whose N+1-bit output (0, B, 2B or B|2B) is placed at weight 2^(2k). The top
// EXACT_BITS bits each drive an exact AND row (and_pp_row) placed at the
// weight of that bit. With the 8-bit default this gives three decoder rows
// (a1a0, a3a2, a5a4) and two AND rows (a6, a7): five rows instead of the
// eight of an AND array, and any error stays in the rows of low weight.
//
// Interface: a (multiplier), b (multiplicand), both N bits; rows is a packed
// array of ROWS = (N-EXACT_BITS)/2 + EXACT_BITS rows of 2N bits, decoder rows
// first (lowest weight first), then the AND rows (lowest weight first).
// Timing: combinational.
module debam_ppg
  import debam_pkg::*;
#(
  parameter int unsigned N          = DEBAM_N,
  parameter int unsigned EXACT_BITS = DEBAM_EXACT_BITS,
  localparam int unsigned GROUPS    = (N - EXACT_BITS) / 2,
  localparam int unsigned ROWS      = GROUPS + EXACT_BITS
) (
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  output logic [ROWS-1:0][2*N-1:0]     rows
);

  if ((N - EXACT_BITS) % 2 != 0 || EXACT_BITS > N) begin : g_bad_cfg
    $error("debam_ppg: N - EXACT_BITS must be even and not negative");
  end

  // Approximate rows from the 2-bit decoders.
  for (genvar k = 0; k < GROUPS; k++) begin : g_dec
    logic [N:0] dec_pp;

    debam_decoder #(.N(N)) u_dec (
      .sel(a[2*k+1 -: 2]),
      .b  (b),
      .pp (dec_pp)
    );

    assign rows[k] = {{(N-1){1'b0}}, dec_pp} << (2*k);
  end

  // Exact rows from AND gates for the most significant multiplier bits.
  for (genvar j = 0; j < EXACT_BITS; j++) begin : g_and
    logic [N-1:0] and_pp;

    and_pp_row #(.N(N)) u_and (
      .a_bit(a[N-EXACT_BITS+j]),
      .b    (b),
      .pp   (and_pp)
    );

    assign rows[GROUPS+j] = {{N{1'b0}}, and_pp} << (N - EXACT_BITS + j);
  end

endmodule
