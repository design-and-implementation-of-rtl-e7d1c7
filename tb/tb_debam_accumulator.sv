// tb_debam_accumulator: self-checking test of the carry-save accumulation
// stage with five 16-bit rows, the 8 x 8 multiplier's configuration.
//
// Rows are random (any 16-bit value, so totals overflow 16 bits) or shaped
// like partial products (an 8-bit value shifted by its weight). The test
// checks that sum_row + carry_row equals the sum of the five rows modulo 2^16,
// and that the carry row's least significant bit is zero as it must be for a
// shifted carry. A watchdog ends the run if it stalls.
module tb_debam_accumulator;

  localparam int unsigned ROWS       = 5;
  localparam int unsigned W          = 16;
  localparam int unsigned VECTORS    = 5000;
  localparam int unsigned MAX_CYCLES = 2 * VECTORS + 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [ROWS-1:0][W-1:0] rows;
  logic [W-1:0]           sum_row, carry_row;

  debam_accumulator #(.ROWS(ROWS), .W(W)) dut (
    .rows(rows), .sum_row(sum_row), .carry_row(carry_row)
  );

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rows();
    longint unsigned total;
    #1;
    total = 0;
    for (int r = 0; r < int'(ROWS); r++) total += longint'(rows[r]);
    checks++;
    if (W'(longint'(sum_row) + longint'(carry_row)) != W'(total)) begin
      failures++;
      $display("FAIL rows=%h sum=%h carry=%h expected total=%h", rows, sum_row, carry_row, W'(total));
    end
    checks++;
    if (carry_row[0] != 1'b0) begin
      failures++;
      $display("FAIL carry row lsb set: %h", carry_row);
    end
  endtask

  initial begin : stimulus
    @(negedge clk);
    rows = '1;
    check_rows();
    for (int n = 0; n < VECTORS; n++) begin
      @(negedge clk);
      for (int r = 0; r < int'(ROWS); r++) rows[r] = W'($urandom);
      check_rows();
      @(negedge clk);
      for (int r = 0; r < int'(ROWS); r++) rows[r] = W'(($urandom & 9'h1FF) << r);
      check_rows();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
