// tb_gf2sr: checks the GF2SR scan register.
// Instances: the 16-stage example (default parameters) and the four 3-stage
// examples R1 (inversion-inserted linear feed-forward SR), R2, R3 and R4.
// Expected values come from the published logic-simulation table of the
// 16-stage register, from the published state-justification and
// state-identification equations of the 3-stage examples, and from a
// behavioural model of the 16-stage register written out in this file.
//  1. From reset, the published input sequence 0,0,0,1,0,0,1,0,0,1,1,1,1,1,
//     1,1 reproduces the published state and output at every clock and ends
//     in the all-ones state.
//  2. The same sequence drives the register to all ones from random captured
//     states (a transfer sequence independent of the initial state).
//  3. Random shifting and capturing matches the model clock by clock, and
//     after 16 shifts the output no longer depends on the initial state.
//  4. R2, R3, R4 started in (0,0,0), (0,1,1), (0,0,0) give identical outputs,
//     all equal to x(t) ^ x(t+2) x(t+1); R1 gives x(t) ^ 1 ^ x(t+2).
//  5. Three-clock transfer sequences from the justification equations reach
//     random target states, and the identification equations recover random
//     captured states from three inputs and outputs.
module tb_gf2sr;
  import gf2sr_pkg::*;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        scan_en;
  logic        xa;
  logic [16:1] da;
  logic [16:1] ya;
  logic        za;

  logic        xr;
  logic [3:1]  dr1, dr2, dr3, dr4;
  logic [3:1]  yr1, yr2, yr3, yr4;
  logic        zr1, zr2, zr3, zr4;

  gf2sr dut_a (.clk, .rst_n, .scan_en, .x(xa), .d(da), .y(ya), .z(za));
  gf2sr #(.K(3), .FN(r_fn(1))) dut_r1 (.clk, .rst_n, .scan_en, .x(xr), .d(dr1), .y(yr1), .z(zr1));
  gf2sr #(.K(3), .FN(r_fn(2))) dut_r2 (.clk, .rst_n, .scan_en, .x(xr), .d(dr2), .y(yr2), .z(zr2));
  gf2sr #(.K(3), .FN(r_fn(3))) dut_r3 (.clk, .rst_n, .scan_en, .x(xr), .d(dr3), .y(yr3), .z(zr3));
  gf2sr #(.K(3), .FN(r_fn(4))) dut_r4 (.clk, .rst_n, .scan_en, .x(xr), .d(dr4), .y(yr4), .z(zr4));

  always #5 clk = ~clk;

  // Published logic simulation of the 16-stage register from the all-zero
  // state: input applied at time t, and state FF1..FF16 at time t (left to
  // right), and the output at time t.
  localparam logic [0:16] A5_IN  = 17'b0_0010_0100_1111_1111;
  localparam logic [0:16] A5_OUT = 17'b0_1111_1100_0000_0001;
  localparam logic [1:16] A5_STATE [0:16] = '{
    16'b0000_0000_0000_0000,
    16'b0000_0000_0100_0001,
    16'b0000_0000_0110_0001,
    16'b0000_0000_0111_0001,
    16'b1000_0000_0111_1001,
    16'b0100_0000_0111_1101,
    16'b0010_0000_0111_1111,
    16'b1001_0000_0111_1110,
    16'b0100_1001_0111_1110,
    16'b0010_0100_1111_1110,
    16'b1001_0010_0011_1110,
    16'b1100_1000_0101_1110,
    16'b1110_0100_0110_1110,
    16'b1111_0010_0111_0110,
    16'b1111_1000_0111_1010,
    16'b1111_1101_0111_1100,
    16'b1111_1111_1111_1111
  };

  // Behavioural model of the 16-stage example, indexed FF1..FF16.
  function automatic logic [1:16] a1_next(logic [1:16] y, logic x);
    logic [1:16] n;
    n[1] = x;
    for (int i = 2; i <= 16; i++) n[i] = y[i-1];
    n[8]  = n[8] ^ (y[1] & y[4]);
    n[10] = ~n[10];
    n[16] = n[16] ^ (~y[9] | y[12]);
    return n;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // state of the 16-stage DUT in FF1..FF16 order
  function automatic logic [1:16] a_state();
    logic [1:16] s;
    for (int i = 1; i <= 16; i++) s[i] = ya[i];
    return s;
  endfunction

  function automatic logic [16:1] to_d(logic [1:16] s);
    logic [16:1] d;
    for (int i = 1; i <= 16; i++) d[i] = s[i];
    return d;
  endfunction

  task automatic tick();
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:16] m, m0, tgt;
    logic        xh[$];
    logic [3:1]  st;
    logic        a, b, c, dd, e, f;
    logic [3:1]  id2, id3, id4;

    rst_n = 1'b0; scan_en = 1'b1; xa = 1'b0; da = '0; xr = 1'b0;
    dr1 = '0; dr2 = '0; dr3 = '0; dr4 = '0;
    tick();
    rst_n = 1'b1;

    // 1. published logic simulation
    for (int t = 0; t <= 16; t++) begin
      xa = A5_IN[t]; #1;
      check($sformatf("A5 state t=%0d", t), 32'(a_state()), 32'(A5_STATE[t]));
      check($sformatf("A5 out t=%0d", t), 32'(za), 32'(A5_OUT[t]));
      if (t < 16) tick();
    end

    // 2. transfer to all ones from random states
    for (int r = 0; r < 30; r++) begin
      scan_en = 1'b0; da = 16'($urandom); tick();
      check("capture", 32'(ya), 32'(da));
      scan_en = 1'b1;
      for (int t = 0; t < 16; t++) begin xa = A5_IN[t]; tick(); end
      check("A4 all ones", 32'(ya), 32'hffff);
    end

    // 3. clock-by-clock against the model
    m = a_state();
    m0 = '0;
    for (int n = 0; n < 3000; n++) begin
      if (n % 200 == 0) begin
        scan_en = 1'b0; da = 16'($urandom); tick();
        m = a_state();
        check("capture m", 32'(ya), 32'(da));
        m0 = '0;
        scan_en = 1'b1;
        for (int t = 0; t < 16; t++) begin
          xa = 1'($urandom); #1;
          check("model z", 32'(za), 32'(m[16]));
          m = a1_next(m, xa); m0 = a1_next(m0, xa);
          tick();
        end
      end
      xa = 1'($urandom); #1;
      check("model z", 32'(za), 32'(m[16]));
      check("z independent of initial state", 32'(za), 32'(m0[16]));
      m = a1_next(m, xa); m0 = a1_next(m0, xa);
      tick();
      check("model state", 32'(a_state()), 32'(m));
    end

    // 4. the 3-stage examples
    rst_n = 1'b0; tick(); rst_n = 1'b1;
    for (int t = 0; t < 3; t++) begin xr = 1'b0; xh.push_back(xr); tick(); end
    check("R2 start", 32'(yr2), 32'(3'b000));
    check("R3 start (y1,y2,y3)=(0,1,1)", 32'(yr3), 32'(3'b110));
    check("R4 start", 32'(yr4), 32'(3'b000));
    for (int n = 0; n < 400; n++) begin
      int t;
      xr = 1'($urandom); xh.push_back(xr); #1;
      t = xh.size() - 1;
      check("R2=R3", 32'(zr3), 32'(zr2));
      check("R2=R4", 32'(zr4), 32'(zr2));
      check("R2 z(t+3)", 32'(zr2), 32'(xh[t-3] ^ (xh[t-1] & xh[t-2])));
      check("R1 z(t+3)", 32'(zr1), 32'(xh[t-3] ^ 1'b1 ^ xh[t-1]));
      tick();
    end

    // 5. justification and identification equations
    for (int r = 0; r < 200; r++) begin
      // justification: random start, random target (a,b,c) = (y1,y2,y3)
      scan_en = 1'b0;
      dr2 = 3'($urandom); dr3 = 3'($urandom); dr4 = 3'($urandom); dr1 = 3'($urandom);
      tick();
      scan_en = 1'b1;
      st = 3'($urandom);
      a = st[1]; b = st[2]; c = st[3];
      // R2: x(t) = c ^ ab, x(t+1) = b, x(t+2) = a
      xr = c ^ (a & b); tick(); xr = b; tick(); xr = a; tick();
      check("R2 justify", 32'(yr2), 32'(st));
      // R3: x(t) = ~c, x(t+1) = ~b, x(t+2) = a
      xr = ~c; tick(); xr = ~b; tick(); xr = a; tick();
      check("R3 justify", 32'(yr3), 32'(st));
      // R4: x(t) = c ^ a ~b, x(t+1) = b, x(t+2) = a
      xr = c ^ (a & ~b); tick(); xr = b; tick(); xr = a; tick();
      check("R4 justify", 32'(yr4), 32'(st));

      // identification: capture random states, apply inputs (a,b,c),
      // observe outputs (d,e,f)
      scan_en = 1'b0;
      dr2 = 3'($urandom); dr3 = 3'($urandom); dr4 = 3'($urandom);
      tick();
      scan_en = 1'b1;
      a = 1'($urandom); b = 1'($urandom); c = 1'($urandom);
      begin
        logic [2:0] o2, o3, o4;
        xr = a; #1; o2[0] = zr2; o3[0] = zr3; o4[0] = zr4; tick();
        xr = b; #1; o2[1] = zr2; o3[1] = zr3; o4[1] = zr4; tick();
        xr = c; #1; o2[2] = zr2; o3[2] = zr3; o4[2] = zr4; tick();
        // R2: y1 = ab ^ f, y2 = a(ab ^ f) ^ e, y3 = d
        id2[1] = (a & b) ^ o2[2];
        id2[2] = (a & id2[1]) ^ o2[1];
        id2[3] = o2[0];
        check("R2 identify", 32'(id2), 32'(dr2));
        // R3: y1 = f ^ ab, y2 = ~e ^ a y1, y3 = ~d ^ y1 ~y2
        id3[1] = o3[2] ^ (a & b);
        id3[2] = ~o3[1] ^ (a & id3[1]);
        id3[3] = ~o3[0] ^ (id3[1] & ~id3[2]);
        check("R3 identify", 32'(id3), 32'(dr3));
        // R4: y1 = f ^ ab, y2 = e ^ a y1, y3 = d ^ y1
        id4[1] = o4[2] ^ (a & b);
        id4[2] = o4[1] ^ (a & id4[1]);
        id4[3] = o4[0] ^ id4[1];
        check("R4 identify", 32'(id4), 32'(dr4));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
