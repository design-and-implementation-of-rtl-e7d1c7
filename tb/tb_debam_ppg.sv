// tb_debam_ppg: exhaustive self-checking test of the partial product
// generation stage in its 8-bit configuration (three decoder rows, two exact
// AND rows).
//
// For every pair of operands each of the five 16-bit rows is compared with its
// expected value, worked out arithmetically: decoder row k holds 0, B, 2B or
// (B | 2B) for the code {a[2k+1], a[2k]}, shifted left by 2k; the AND rows
// hold a[6]*B << 6 and a[7]*B << 7. The test counts how often each decoder
// code reaches each group and fails if one never does. A watchdog ends the
// run if it stalls.
module tb_debam_ppg;

  localparam int unsigned N          = 8;
  localparam int unsigned EXACT_BITS = 2;
  localparam int unsigned GROUPS     = (N - EXACT_BITS) / 2;
  localparam int unsigned ROWS       = GROUPS + EXACT_BITS;
  localparam int unsigned MAX_CYCLES = (1 << (2 * N)) + 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int code_hits [GROUPS][4];

  logic [N-1:0]             a, b;
  logic [ROWS-1:0][2*N-1:0] rows;

  debam_ppg #(.N(N), .EXACT_BITS(EXACT_BITS)) dut (.a(a), .b(b), .rows(rows));

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    foreach (code_hits[g, c]) code_hits[g][c] = 0;
    for (int av = 0; av < (1 << N); av++) begin
      for (int bv = 0; bv < (1 << N); bv++) begin
        @(negedge clk);
        a = N'(av);
        b = N'(bv);
        #1;
        for (int k = 0; k < int'(GROUPS); k++) begin
          int code, value;
          code = (av >> (2 * k)) & 3;
          value = (code == 3) ? (bv | (bv << 1)) : code * bv;
          code_hits[k][code]++;
          checks++;
          if (int'(rows[k]) != (value << (2 * k))) begin
            failures++;
            if (failures <= 20) $display("FAIL decoder row %0d a=%h b=%h row=%h", k, a, b, rows[k]);
          end
        end
        for (int j = 0; j < int'(EXACT_BITS); j++) begin
          int bitpos;
          bitpos = int'(N - EXACT_BITS) + j;
          checks++;
          if (int'(rows[GROUPS+j]) != (((av >> bitpos) & 1) * bv) << bitpos) begin
            failures++;
            if (failures <= 20) $display("FAIL AND row %0d a=%h b=%h row=%h", j, a, b, rows[GROUPS+j]);
          end
        end
      end
    end
    foreach (code_hits[g, c]) begin
      checks++;
      if (code_hits[g][c] == 0) begin
        failures++;
        if (failures <= 20) $display("FAIL group %0d never saw code %0d", g, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
