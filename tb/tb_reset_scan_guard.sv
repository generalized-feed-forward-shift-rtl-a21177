// tb_reset_scan_guard: checks the scan-after-reset guard.
// After reset the output stays zero whatever the chain delivers, for any
// number of shift clocks; the first capture clock clears the guard, after
// which scan_out follows chain_out, through further shifts and captures,
// until the next reset.
module tb_reset_scan_guard;
  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic scan_en;
  logic chain_out;
  logic scan_out;
  logic blocked;

  reset_scan_guard dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic guard;
    rst_n = 1'b1; scan_en = 1'b0; chain_out = 1'b1;
    @(posedge clk); #1;
    for (int round = 0; round < 8; round++) begin
      // reset, then shift for a random number of clocks
      rst_n = 1'b0; scan_en = 1'($urandom);
      @(posedge clk); #1;
      rst_n = 1'b1;
      scan_en = 1'b1;
      check("blocked after reset", blocked, 1'b1);
      repeat (5 + $urandom_range(0, 40)) begin
        chain_out = 1'b1; #1;
        check("masked 1", scan_out, 1'b0);
        chain_out = 1'($urandom); #1;
        check("masked", scan_out, 1'b0);
        @(posedge clk); #1;
      end
      // one capture clock releases it
      scan_en = 1'b0;
      @(posedge clk); #1;
      check("released", blocked, 1'b0);
      guard = 1'b0;
      repeat (50) begin
        scan_en = 1'($urandom);
        chain_out = 1'($urandom); #1;
        check("pass", scan_out, chain_out);
        @(posedge clk); #1;
        check("stays released", blocked, guard);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
