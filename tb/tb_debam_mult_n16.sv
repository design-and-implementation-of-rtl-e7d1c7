// tb_debam_mult_n16: self-checking random test of the decoder-based
// approximate multiplier extended to 16 x 16 -> 32 bits (seven decoder
// groups for a[13:0], exact AND rows for a[15] and a[14]).
//
// Random and corner operand pairs are compared with an arithmetic reference
// (0, B, 2B or B | 2B per low bit pair of A at weight 4^k, exact rows for the
// two top bits). The product must also never exceed a*b, and must equal it
// when no low bit pair of A is 11. Error statistics are printed at the end.
// A watchdog ends the run if it stalls.
module tb_debam_mult_n16;

  localparam int unsigned N          = 16;
  localparam int unsigned EXACT_BITS = 2;
  localparam int unsigned GROUPS     = (N - EXACT_BITS) / 2;
  localparam int unsigned VECTORS    = 50000;
  localparam int unsigned MAX_CYCLES = VECTORS + 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int exact_results  = 0;
  int approx_results = 0;
  real rel_err_sum   = 0.0;
  int  nonzero_exact = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  debam_mult #(.N(N), .EXACT_BITS(EXACT_BITS)) dut (.a(a), .b(b), .p(p));

  function automatic longint reference_product(input longint av, input longint bv);
    longint total;
    total = 0;
    for (int k = 0; k < int'(GROUPS); k++) begin
      longint code;
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

  task automatic apply(input logic [N-1:0] av, bv);
    longint exact, approx;
    bit has_11;
    @(negedge clk);
    a = av;
    b = bv;
    #1;
    exact  = longint'(av) * longint'(bv);
    approx = reference_product(longint'(av), longint'(bv));
    checks++;
    if (longint'(p) != approx) begin
      failures++;
      if (failures <= 20) $display("FAIL a=%h b=%h p=%h expected=%h", av, bv, p, approx);
    end
    checks++;
    if (longint'(p) > exact) begin
      failures++;
      if (failures <= 20) $display("FAIL a=%h b=%h p=%h above exact", av, bv, p);
    end
    has_11 = 1'b0;
    for (int k = 0; k < int'(GROUPS); k++) if (av[2*k+1 -: 2] == 2'b11) has_11 = 1'b1;
    if (!has_11) begin
      checks++;
      if (longint'(p) != exact) begin
        failures++;
        if (failures <= 20) $display("FAIL a=%h b=%h p=%h not exact without code 11", av, bv, p);
      end
    end
    if (longint'(p) == exact) exact_results++;
    else                      approx_results++;
    if (exact != 0) begin
      rel_err_sum += real'(exact - longint'(p)) / real'(exact);
      nonzero_exact++;
    end
  endtask

  initial begin : stimulus
    apply('0, '0);
    apply('1, '1);
    apply(16'h5555, 16'hFFFF);   // no code 11: exact
    apply(16'h3FFF, 16'hFFFF);   // every decoder group at code 11
    apply(16'hC000, 16'hFFFF);   // only the exact rows
    for (int n = 0; n < int'(VECTORS); n++) begin
      apply(N'($urandom), N'($urandom));
    end
    checks += 2;
    if (exact_results == 0)  begin failures++; $display("FAIL no exact result seen"); end
    if (approx_results == 0) begin failures++; $display("FAIL no approximate result seen"); end
    $display("16-bit: exact=%0d approximate=%0d MRED=%0.5f", exact_results, approx_results,
             rel_err_sum / real'(nonzero_exact));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
