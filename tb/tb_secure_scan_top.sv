// tb_secure_scan_top: end-to-end scan test of the secure scan chain at its
// default size (16 conventional scan flip-flops followed by the 16-stage
// GF2SR secret register).
// The testbench plays the tester. For every pattern it computes the scan-in
// sequence that leaves the wanted state in the chain (state justification),
// shifts it in, applies one capture clock through a behavioural kernel, then
// shifts the response out while shifting the next pattern in, and computes
// the captured state from the scan-in and scan-out sequences (state
// identification). Both computations use only a behavioural model of the
// chain and bit-by-bit implication: the bit that the wanted state needs in
// flip-flop i is fixed by scan-in bit L-i once the later bits are known, and
// scan-out bit L-i fixes flip-flop i once flip-flops 1..i-1 are known.
// Checks: every scan-in reaches its target in exactly L = 16 + 16 clocks,
// every capture equals the kernel's response, every identification recovers
// it, scan_out is zero between a reset and the first capture even while the
// chain's own output is one, and a run of normal-mode clocks behaves as
// plain registers. Each mechanism is counted and must occur.
module tb_secure_scan_top;
  localparam int unsigned N = 16;           // conventional part
  localparam int unsigned K = 16;           // GF2SR part
  localparam int unsigned L = N + K;
  localparam int unsigned PATTERNS = 40;

  int checks = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         scan_en;
  logic         scan_in;
  logic         scan_out;
  logic         scan_blocked;
  logic [N:1]   d_plain;
  logic [N:1]   q_plain;
  logic [K:1]   d_secret;
  logic [K:1]   q_secret;

  secure_scan_top dut (.*);

  always #5 clk = ~clk;

  typedef logic [1:L] chain_t;   // flip-flop 1 is next to scan_in

  // Behavioural model of the chain: N plain stages, then the GF2SR with
  // FF8 = FF7 ^ (FF1 & FF4), FF10 = ~FF9, FF16 = FF15 ^ (~FF9 | FF12).
  function automatic chain_t chain_next(chain_t c, logic sin);
    chain_t n;
    n[1] = sin;
    for (int i = 2; i <= L; i++) n[i] = c[i-1];
    n[N+8]  = n[N+8] ^ (c[N+1] & c[N+4]);
    n[N+10] = ~n[N+10];
    n[N+16] = n[N+16] ^ (~c[N+9] | c[N+12]);
    return n;
  endfunction

  // Scan-in sequence (bit j is applied at clock j) that leaves tgt in the
  // chain after L clocks, from any state.
  function automatic chain_t justify(chain_t tgt);
    chain_t seq = '0;
    for (int i = 1; i <= L; i++) begin
      chain_t c = '0;
      for (int j = 0; j < L; j++) c = chain_next(c, seq[j+1]);
      seq[L-i+1] = tgt[i] ^ c[i];
    end
    return seq;
  endfunction

  // State at the start of an unload, from the scan-out bits zo (bit j seen
  // at clock j) and the scan-in bits si shifted in meanwhile.
  function automatic chain_t identify(chain_t zo, chain_t si);
    chain_t st = '0;
    for (int i = 1; i <= L; i++) begin
      chain_t c = st;
      for (int j = 0; j < int'(L) - i; j++) c = chain_next(c, si[j+1]);
      st[i] = zo[L-i+1] ^ c[L];
    end
    return st;
  endfunction

  // Behavioural kernel: next-state logic of the circuit under test.
  function automatic chain_t kernel(chain_t c);
    logic [N:1] p;
    logic [K:1] s;
    logic [N:1] np;
    logic [K:1] ns;
    chain_t r;
    for (int i = 1; i <= N; i++) p[i] = c[i];
    for (int i = 1; i <= K; i++) s[i] = c[N+i];
    np = {p[N-1:1], p[N]} ^ s;
    ns = s + p + 16'h3a5c;
    for (int i = 1; i <= N; i++) r[i] = np[i];
    for (int i = 1; i <= K; i++) r[N+i] = ns[i];
    return r;
  endfunction

  function automatic chain_t dut_state();
    chain_t c;
    for (int i = 1; i <= N; i++) c[i] = q_plain[i];
    for (int i = 1; i <= K; i++) c[N+i] = q_secret[i];
    return c;
  endfunction

  // The kernel is combinational from the register outputs.
  always_comb begin
    chain_t k;
    k = kernel(dut_state());
    for (int i = 1; i <= N; i++) d_plain[i] = k[i];
    for (int i = 1; i <= K; i++) d_secret[i] = k[N+i];
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  int n_scan_in = 0;
  int n_capture = 0;
  int n_overlap = 0;
  int n_identify = 0;
  int n_masked_one = 0;
  int n_guard_release = 0;
  int n_normal_run = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shift L clocks with scan-in bits si, returning the scan-out bits.
  // When expect_masked is set the chain is known to hold zero (just reset)
  // and the model tracks what the chain itself would put out.
  task automatic shift(input chain_t si, output chain_t zo, input logic expect_masked);
    chain_t mc = '0;
    scan_en = 1'b1;
    for (int j = 1; j <= L; j++) begin
      scan_in = si[j];
      #1;
      zo[j] = scan_out;
      if (expect_masked) begin
        check("masked after reset", 64'(scan_out), 64'(0));
        if (mc[L]) n_masked_one++;
        mc = chain_next(mc, si[j]);
      end
      tick();
    end
  endtask

  initial begin
    chain_t pat, nxt, seq, zo, resp, got;
    rst_n = 1'b0; scan_en = 1'b1; scan_in = 1'b0;
    tick();
    rst_n = 1'b1;
    check("reset state", 64'(dut_state()), 64'(0));

    for (int round = 0; round < 3; round++) begin
      // load the first pattern straight after reset: output is blocked
      pat = {$urandom, $urandom};
      seq = justify(pat);
      check("guard set", 64'(scan_blocked), 64'(1));
      shift(seq, zo, 1'b1);
      check("scan-in after reset", 64'(dut_state()), 64'(pat));
      n_scan_in++;
      for (int p = 0; p < PATTERNS; p++) begin
        // capture
        resp = kernel(dut_state());
        scan_en = 1'b0;
        tick();
        check("capture", 64'(dut_state()), 64'(resp));
        n_capture++;
        if (!scan_blocked && p == 0) n_guard_release++;
        check("guard clear", 64'(scan_blocked), 64'(0));
        // unload the response while loading the next pattern
        nxt = {$urandom, $urandom};
        if (p % 8 == 3) nxt = '0;
        if (p % 8 == 5) nxt = '1;
        seq = justify(nxt);
        shift(seq, zo, 1'b0);
        check("scan-in", 64'(dut_state()), 64'(nxt));
        n_scan_in++;
        n_overlap++;
        got = identify(zo, seq);
        check("identify", 64'(got), 64'(resp));
        n_identify++;
      end
      // normal operation: several clocks in functional mode
      for (int c = 0; c < 20; c++) begin
        resp = kernel(dut_state());
        scan_en = 1'b0;
        tick();
        check("normal mode", 64'(dut_state()), 64'(resp));
      end
      n_normal_run++;
      // reset before the next round
      rst_n = 1'b0; tick(); rst_n = 1'b1;
    end

    check("mechanism: scan-in", 64'(n_scan_in > 0), 64'(1));
    check("mechanism: capture", 64'(n_capture > 0), 64'(1));
    check("mechanism: overlapped scan-out/scan-in", 64'(n_overlap > 0), 64'(1));
    check("mechanism: state identification", 64'(n_identify > 0), 64'(1));
    check("mechanism: output masked after reset", 64'(n_masked_one > 0), 64'(1));
    check("mechanism: guard released by capture", 64'(n_guard_release > 0), 64'(1));
    check("mechanism: normal-mode run", 64'(n_normal_run > 0), 64'(1));
    $display("mechanisms: scan_in=%0d capture=%0d overlap=%0d identify=%0d masked_ones=%0d release=%0d normal_runs=%0d",
             n_scan_in, n_capture, n_overlap, n_identify, n_masked_one, n_guard_release, n_normal_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
