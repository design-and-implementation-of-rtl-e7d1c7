// rca: W-bit ripple carry adder, the final two-operand adder of the
// multiplier.
//
// A chain of W full adders; bit i takes the carry of bit i-1, so the delay
// grows linearly with W. In the multiplier it adds the sum and carry rows left
// by the carry-save accumulation to give the product, as the published design
// specifies; the carry-in and carry-out ports are this implementation's.
//
// Interface: operands a, b (W bits), carry in cin, sum (W bits), carry out
// cout. Timing: combinational, W full-adder delays worst case.
module rca #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;   // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .x   (a[i]),
      .y   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
