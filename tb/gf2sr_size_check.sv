// gf2sr_size_check: exercises one GF2SR of K stages built from a regular
// rule, for the size sweep in tb_gf2sr_sizes.
// Rule for the feed-forward functions (i = tap index, the function feeds
// stage i+1): i % 7 == 5 -> f_i = y_{i-5} & y_{i-2} (y_0 = x);
// i % 11 == 3 -> f_i = 1; i % 13 == 6 -> f_i = ~y_{i-3} | x; the output is
// z = y_K ^ y_{K/2}. A behavioural model evaluates the same rule directly.
// The checker captures random states, drives the register to random target
// states with sequences found by implication on the model (state
// justification), recovers captured states from input/output sequences
// (state identification), and compares output and state with the model on
// every clock. Results appear on checks/failures when done rises.
module gf2sr_size_check
  import gf2sr_pkg::*;
#(
  parameter int unsigned K = 32,
  parameter int unsigned ROUNDS = 20
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  typedef logic [1:K] st_t;

  function automatic ffn_t [K:0] rule_fn();
    ffn_t [K:0] c;
    for (int i = 0; i <= K; i++) c[i] = fn_const(1'b0);
    for (int i = 1; i < K; i++) begin
      if (i % 7 == 5)       c[i] = fn_and2(src_t'(i - 5), 1'b0, src_t'(i - 2), 1'b0);
      else if (i % 11 == 3) c[i] = fn_const(1'b1);
      else if (i % 13 == 6) c[i] = fn_or2(src_t'(i - 3), 1'b1, SRC_X, 1'b0);
    end
    c[K] = fn_lit(src_t'(K / 2), 1'b0);
    return c;
  endfunction

  localparam ffn_t [K:0] FN = rule_fn();

  logic       rst_n;
  logic       scan_en;
  logic       x;
  logic [K:1] d;
  logic [K:1] y;
  logic       z;

  gf2sr #(.K(K), .FN(FN)) dut (.clk, .rst_n, .scan_en, .x, .d, .y, .z);

  function automatic logic mval(st_t s, logic xv, int unsigned j);
    return (j == 0) ? xv : s[j];
  endfunction

  function automatic st_t m_next(st_t s, logic xv);
    st_t n;
    n[1] = xv;
    for (int i = 1; i < K; i++) begin
      logic f = 1'b0;
      if (i % 7 == 5)       f = mval(s, xv, i - 5) & mval(s, xv, i - 2);
      else if (i % 11 == 3) f = 1'b1;
      else if (i % 13 == 6) f = ~mval(s, xv, i - 3) | xv;
      n[i+1] = s[i] ^ f;
    end
    return n;
  endfunction

  function automatic logic m_z(st_t s);
    return s[K] ^ s[K/2];
  endfunction

  function automatic st_t justify(st_t tgt);
    st_t seq = '0;
    for (int i = 1; i <= K; i++) begin
      st_t c = '0;
      for (int j = 1; j <= K; j++) c = m_next(c, seq[j]);
      seq[K-i+1] = tgt[i] ^ c[i];
    end
    return seq;
  endfunction

  function automatic st_t identify(st_t zo, st_t si);
    st_t st = '0;
    for (int i = 1; i <= K; i++) begin
      st_t c = st;
      for (int j = 1; j <= int'(K) - i; j++) c = m_next(c, si[j]);
      st[i] = zo[K-i+1] ^ m_z(c);
    end
    return st;
  endfunction

  function automatic st_t rnd();
    st_t r;
    for (int i = 1; i <= K; i++) r[i] = 1'($urandom);
    return r;
  endfunction

  function automatic st_t dut_st();
    st_t s;
    for (int i = 1; i <= K; i++) s[i] = y[i];
    return s;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL K=%0d %s", K, what);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  initial begin
    st_t cap, tgt, seq, zo, m;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; scan_en = 1'b1; x = 1'b0; d = '0;
    tick();
    rst_n = 1'b1;
    for (int r = 0; r < ROUNDS; r++) begin
      cap = rnd();
      tgt = rnd();
      for (int i = 1; i <= K; i++) d[i] = cap[i];
      scan_en = 1'b0;
      tick();
      check("capture", 1'(dut_st() == cap), 1'b1);
      scan_en = 1'b1;
      seq = justify(tgt);
      m = cap;
      for (int j = 1; j <= K; j++) begin
        x = seq[j]; #1;
        zo[j] = z;
        check("z vs model", z, m_z(m));
        m = m_next(m, x);
        tick();
        check("state vs model", 1'(dut_st() == m), 1'b1);
      end
      check("justified", 1'(dut_st() == tgt), 1'b1);
      check("identified", 1'(identify(zo, seq) == cap), 1'b1);
    end
    done = 1'b1;
  end

endmodule
