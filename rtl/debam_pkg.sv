// debam_pkg: shared types and default sizes of the decoder-based approximate
// multiplier (DeBAM).
//
// The multiplier A is split into 2-bit groups; each group is the select input
// of a decoder block. dec_sel_e names the four select codes, written as
// {a[x+1], a[x]}, together with the partial product each one produces
// (multiplicand B, shifted, OR-combined or zero). The default operand width
// (8 bits) and the number of most significant multiplier bits that use exact
// AND-gate rows (2, a7 and a6) are the design's main configuration.
package debam_pkg;

  // Operand width of the main configuration (8 x 8 -> 16).
  localparam int unsigned DEBAM_N = 8;
  // Most significant multiplier bits handled by exact AND rows (a7, a6).
  localparam int unsigned DEBAM_EXACT_BITS = 2;

  // Decoder select code {a[x+1], a[x]}.
  typedef enum logic [1:0] {
    SEL_ZERO   = 2'b00,  // partial product is zero
    SEL_B      = 2'b01,  // partial product is B
    SEL_B_SHL  = 2'b10,  // partial product is B << 1 (exact 2*B)
    SEL_B_OR   = 2'b11   // partial product is B | (B << 1), approximates 3*B
  } dec_sel_e;

endpackage
