// tb_and_pp_row: exhaustive self-checking test of the exact AND partial
// product row: for every multiplier bit value and every 8-bit multiplicand the
// row must equal a_bit * B. A watchdog ends the run if it stalls.
module tb_and_pp_row;

  localparam int unsigned N          = 8;
  localparam int unsigned MAX_CYCLES = 5000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic         a_bit;
  logic [N-1:0] b;
  logic [N-1:0] pp;

  and_pp_row #(.N(N)) dut (.a_bit(a_bit), .b(b), .pp(pp));

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int av = 0; av < 2; av++) begin
      for (int bv = 0; bv < (1 << N); bv++) begin
        @(negedge clk);
        a_bit = 1'(av);
        b     = N'(bv);
        #1;
        checks++;
        if (int'(pp) != av * bv) begin
          failures++;
          $display("FAIL a_bit=%0d b=%h pp=%h", av, b, pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
