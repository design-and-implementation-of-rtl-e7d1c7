// tb_debam_decoder: exhaustive self-checking test of the 2-bit decoder block.
//
// Every select code (00, 01, 10, 11) is applied with every 8-bit multiplicand.
// The expected partial product is built bit by bit from the table of the
// decoder (0, B, B shifted left, B OR B shifted left), and for code 11 the
// test also checks that the result never exceeds 3*B and equals 3*B exactly
// when B has no two adjacent ones. A watchdog ends the run if it stalls.
module tb_debam_decoder;
  import debam_pkg::*;

  localparam int unsigned N          = 8;
  localparam int unsigned MAX_CYCLES = 10000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int hits [4] = '{default: 0};

  logic [1:0]   sel;
  logic [N-1:0] b;
  logic [N:0]   pp;

  debam_decoder #(.N(N)) dut (.sel(sel), .b(b), .pp(pp));

  function automatic logic [N:0] expected_pp(input logic [1:0] s, input logic [N-1:0] bv);
    logic [N:0] e;
    for (int i = 0; i <= N; i++) begin
      logic lo, hi;
      lo = (i < N) ? bv[i] : 1'b0;      // bit i of B
      hi = (i > 0) ? bv[i-1] : 1'b0;    // bit i of B << 1
      case (s)
        2'b00:   e[i] = 1'b0;
        2'b01:   e[i] = lo;
        2'b10:   e[i] = hi;
        default: e[i] = lo | hi;
      endcase
    end
    return e;
  endfunction

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int s = 0; s < 4; s++) begin
      for (int bv = 0; bv < (1 << N); bv++) begin
        @(negedge clk);
        sel = 2'(s);
        b   = N'(bv);
        #1;
        checks++;
        hits[s]++;
        if (pp !== expected_pp(sel, b)) begin
          failures++;
          $display("FAIL sel=%b b=%h pp=%h expected=%h", sel, b, pp, expected_pp(sel, b));
        end
        if (s == 3) begin
          int unsigned three_b;
          three_b = 3 * bv;
          checks++;
          if (int'(pp) > int'(three_b) ||
              ((int'(pp) == int'(three_b)) != ((bv & (bv << 1)) == 0))) begin
            failures++;
            $display("FAIL code 11 bound: b=%h pp=%0d 3b=%0d", b, pp, three_b);
          end
        end
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (hits[s] == 0) begin
        failures++;
        $display("FAIL select code %0d never applied", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
