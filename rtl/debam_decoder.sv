// debam_decoder: 2-bit decoder logic block of the decoder-based approximate
// multiplier.
//
// One pair of multiplier bits {a[x+1], a[x]} selects which approximate partial
// product the block passes on for the multiplicand B:
//   00 -> 0,  01 -> B,  10 -> B << 1,  11 -> B | (B << 1).
// The first three cases are exact (0, 1 and 2 times B). The last one should be
// 3*B = B + 2B; the addition is replaced by a bitwise OR, which drops every
// carry of that addition, so the output is never above 3*B. The block is pure
// gates (AND-OR select per bit), as the decoder circuit is described; there is
// no internal accumulation.
//
// Interface: sel is {a[x+1], a[x]}, b is the N-bit multiplicand and pp is the
// N+1-bit partial product, still at weight 2^x (the parent shifts it).
// Timing: combinational, no clock.
module debam_decoder
  import debam_pkg::*;
#(
  parameter int unsigned N = DEBAM_N
) (
  input  logic [1:0] sel,
  input  logic [N-1:0] b,
  output logic [N:0]   pp
);

  logic [N:0] b_ext;   // B at weight 1
  logic [N:0] b_shl;   // B at weight 2

  assign b_ext = {1'b0, b};
  assign b_shl = {b, 1'b0};

  always_comb begin
    unique case (dec_sel_e'(sel))
      SEL_ZERO:  pp = '0;
      SEL_B:     pp = b_ext;
      SEL_B_SHL: pp = b_shl;
      SEL_B_OR:  pp = b_ext | b_shl;
      default:   pp = '0;
    endcase
  end

endmodule
