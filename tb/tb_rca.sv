// tb_rca: self-checking test of the ripple carry adder.
//
// A 16-bit adder (the width used in the 8 x 8 multiplier) gets random and
// corner operands, including full-length carry ripples; {cout, sum} must
// equal a + b + cin. A watchdog ends the run if it stalls.
module tb_rca;

  localparam int unsigned W          = 16;
  localparam int unsigned VECTORS    = 5000;
  localparam int unsigned MAX_CYCLES = VECTORS + 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;

  rca #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] av, bv, input logic cv);
    longint unsigned expected;
    @(negedge clk);
    a = av; b = bv; cin = cv;
    #1;
    expected = longint'(av) + longint'(bv) + longint'(cv);
    checks++;
    if ({cout, sum} != (W+1)'(expected)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> %b_%h expected %h", av, bv, cv, cout, sum, expected);
    end
  endtask

  initial begin : stimulus
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);     // carry through every bit
    apply('1, '1, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h7FFF, 16'h0001, 1'b0);
    for (int n = 0; n < VECTORS; n++) begin
      apply(W'($urandom), W'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
