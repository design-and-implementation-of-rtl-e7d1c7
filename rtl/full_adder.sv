// full_adder: one-bit full adder, the cell of the carry-save rows and of the
// ripple carry adder.
//
// sum = x ^ y ^ cin, cout = majority(x, y, cin). Combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);

  assign sum  = x ^ y ^ cin;
  assign cout = (x & y) | (x & cin) | (y & cin);

endmodule
