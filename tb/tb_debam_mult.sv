// tb_debam_mult: end-to-end, exhaustive self-checking test of the
// decoder-based approximate multiplier at its default size (8 x 8 -> 16).
//
// All 65536 operand pairs are applied, one per clock cycle. For each, the
// product is compared with a reference computed arithmetically: the low
// multiplier bits in pairs contribute 0, B, 2B or (B | 2B) at weight 4^k, the
// two top bits contribute exact a[i]*B*2^i. The test also checks the design's
// error properties against the exact product a*b: the result never exceeds
// a*b, and it equals a*b whenever no low bit pair of A is 11.
//
// Mechanisms counted (each must occur at least once): every decoder code in
// every group, the approximate code 11 giving an inexact row (B with adjacent
// ones), exact results, approximate results, and each exact AND row in use.
// At the end it prints the error statistics of the multiplier: error rate,
// mean error distance, mean relative error and the largest error. A watchdog
// ends the run if it stalls.
module tb_debam_mult;

  localparam int unsigned N          = 8;
  localparam int unsigned EXACT_BITS = 2;
  localparam int unsigned GROUPS     = (N - EXACT_BITS) / 2;
  localparam int unsigned MAX_CYCLES = (1 << (2 * N)) + 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // mechanism counters
  int code_hits [GROUPS][4];
  int inexact_or_rows = 0;   // code 11 where B | 2B differs from 3B
  int exact_results   = 0;
  int approx_results  = 0;
  int and_row_used [EXACT_BITS];

  // error statistics
  longint unsigned err_sum = 0;
  real             rel_err_sum = 0.0;
  int              max_err = 0;
  int              nonzero_exact = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  debam_mult dut (.a(a), .b(b), .p(p));

  function automatic int reference_product(input int av, input int bv);
    int total;
    total = 0;
    for (int k = 0; k < int'(GROUPS); k++) begin
      int code;
      code = (av >> (2 * k)) & 3;
      total += ((code == 3) ? (bv | (bv << 1)) : code * bv) << (2 * k);
    end
    for (int i = int'(N - EXACT_BITS); i < int'(N); i++) begin
      total += ((av >> i) & 1) * (bv << i);
    end
    return total;
  endfunction

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    foreach (code_hits[g, c]) code_hits[g][c] = 0;
    foreach (and_row_used[j]) and_row_used[j] = 0;

    for (int av = 0; av < (1 << N); av++) begin
      for (int bv = 0; bv < (1 << N); bv++) begin
        int exact, approx, err;
        bit has_11;
        @(negedge clk);
        a = N'(av);
        b = N'(bv);
        #1;
        exact  = av * bv;
        approx = reference_product(av, bv);

        checks++;
        if (int'(p) != approx) begin
          failures++;
          if (failures <= 20) $display("FAIL a=%0d b=%0d p=%0d expected=%0d", av, bv, p, approx);
        end

        has_11 = 1'b0;
        for (int k = 0; k < int'(GROUPS); k++) begin
          int code;
          code = (av >> (2 * k)) & 3;
          code_hits[k][code]++;
          if (code == 3) begin
            has_11 = 1'b1;
            if ((bv & (bv << 1)) != 0) inexact_or_rows++;
          end
        end
        for (int j = 0; j < int'(EXACT_BITS); j++) begin
          if (((av >> (int'(N - EXACT_BITS) + j)) & 1) != 0 && bv != 0) and_row_used[j]++;
        end

        checks++;
        if (int'(p) > exact) begin
          failures++;
          if (failures <= 20) $display("FAIL a=%0d b=%0d p=%0d above exact %0d", av, bv, p, exact);
        end
        if (!has_11) begin
          checks++;
          if (int'(p) != exact) begin
            failures++;
            if (failures <= 20) $display("FAIL a=%0d b=%0d p=%0d not exact (%0d) without code 11", av, bv, p, exact);
          end
        end

        err = exact - int'(p);
        if (err != 0) approx_results++;
        else          exact_results++;
        err_sum += longint'(err);
        if (err > max_err) max_err = err;
        if (exact != 0) begin
          rel_err_sum += real'(err) / real'(exact);
          nonzero_exact++;
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
    foreach (and_row_used[j]) begin
      checks++;
      if (and_row_used[j] == 0) begin
        failures++;
        if (failures <= 20) $display("FAIL exact AND row %0d never used", j);
      end
    end
    checks += 3;
    if (inexact_or_rows == 0) begin failures++; $display("FAIL code 11 never approximated"); end
    if (exact_results   == 0) begin failures++; $display("FAIL no exact result seen"); end
    if (approx_results  == 0) begin failures++; $display("FAIL no approximate result seen"); end

    $display("mechanisms: code11_inexact_rows=%0d exact_results=%0d approx_results=%0d and_rows=%0d/%0d",
             inexact_or_rows, exact_results, approx_results, and_row_used[0], and_row_used[1]);
    $display("error stats over %0d pairs: error_rate=%0.4f MED=%0.3f MRED=%0.5f max_error=%0d",
             1 << (2 * N), real'(approx_results) / real'(1 << (2 * N)),
             real'(err_sum) / real'(1 << (2 * N)),
             rel_err_sum / real'(nonzero_exact), max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
