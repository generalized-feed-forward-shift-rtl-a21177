// tb_scan_chain: checks the conventional scan chain segment.
// Reset clears it; random bits shifted in appear at scan_out N clocks later
// (checked every clock against a queue); a capture loads d; the captured
// word is then shifted out bit by bit, last flip-flop first, while a new
// word shifts in.
module tb_scan_chain;
  localparam int unsigned N = 8;

  int checks = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         scan_en;
  logic         scan_in;
  logic [N:1]   d;
  logic [N:1]   q;
  logic         scan_out;

  scan_chain #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic hist[$];
    logic [N:1] cap;
    logic [N:1] nxt;
    rst_n = 1'b0; scan_en = 1'b0; scan_in = 1'b0; d = '1;
    @(posedge clk); #1;
    check("reset", 32'(q), 32'(0));
    rst_n = 1'b1;
    // shift latency
    scan_en = 1'b1;
    for (int c = 0; c < 60; c++) begin
      scan_in = 1'($urandom);
      hist.push_back(scan_in);
      @(posedge clk); #1;
      if (hist.size() >= N) check("latency", 32'(scan_out), 32'(hist[hist.size()-N]));
    end
    // capture and unload
    for (int r = 0; r < 10; r++) begin
      cap = N'($urandom);
      nxt = N'($urandom);
      scan_en = 1'b0; d = cap;
      @(posedge clk); #1;
      check("capture", 32'(q), 32'(cap));
      scan_en = 1'b1;
      for (int c = 0; c < N; c++) begin
        check("unload", 32'(scan_out), 32'(cap[N-c]));
        scan_in = nxt[N-c];
        @(posedge clk); #1;
      end
      check("load", 32'(q), 32'(nxt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
