// tb_csa_3to2: self-checking test of a 16-bit row of 3:2 carry-save adders.
//
// Random and corner operands are applied; for each, the test checks
// x + y + z = sum + 2*carry (as 18-bit integers) and, bit by bit, that sum is
// the parity and carry the majority of the three input bits. A watchdog ends
// the run if it stalls.
module tb_csa_3to2;

  localparam int unsigned W          = 16;
  localparam int unsigned VECTORS    = 4000;
  localparam int unsigned MAX_CYCLES = VECTORS + 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [W-1:0] x, y, z, sum, carry;

  csa_3to2 #(.W(W)) dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] xv, yv, zv);
    longint unsigned total, compressed;
    @(negedge clk);
    x = xv; y = yv; z = zv;
    #1;
    total      = longint'(xv) + longint'(yv) + longint'(zv);
    compressed = longint'(sum) + 2 * longint'(carry);
    checks++;
    if (total != compressed) begin
      failures++;
      $display("FAIL x=%h y=%h z=%h sum=%h carry=%h", xv, yv, zv, sum, carry);
    end
    for (int i = 0; i < W; i++) begin
      int ones;
      ones = int'(xv[i]) + int'(yv[i]) + int'(zv[i]);
      checks++;
      if (sum[i] != ones[0] || carry[i] != (ones >= 2)) begin
        failures++;
        $display("FAIL bit %0d x=%h y=%h z=%h", i, xv, yv, zv);
      end
    end
  endtask

  initial begin : stimulus
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '0);
    apply(16'hAAAA, 16'h5555, 16'hFFFF);
    for (int n = 0; n < VECTORS; n++) begin
      apply(W'($urandom), W'($urandom), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
