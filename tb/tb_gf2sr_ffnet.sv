// tb_gf2sr_ffnet: checks the feed-forward network against functions written
// out by hand.
// Three networks are tested: the 16-stage example (default parameters),
// exhaustively over all 16 input combinations of the 3-stage R3 and R4
// examples, and with random vectors for the 16-stage one. Expected values:
//   16 stages: s_1 = x, s_i = y_{i-1} except s_8 = y_7 ^ (y_1 & y_4),
//              s_10 = ~y_9, s_16 = y_15 ^ (~y_9 | y_12); z = y_16.
//   R3: s = (x, ~y1, y2), z = y3 ^ (~y1 | y2).
//   R4: s = (x, y1, y2 ^ (x & ~y1)), z = y3 ^ y1.
module tb_gf2sr_ffnet;
  import gf2sr_pkg::*;

  int checks = 0;
  int failures = 0;

  logic        xa;
  logic [16:1] ya;
  logic [16:1] sa;
  logic        za;
  logic        xb;
  logic [3:1]  yb;
  logic [3:1]  sb3, sb4;
  logic        zb3, zb4;

  gf2sr_ffnet dut_a (.x(xa), .y(ya), .s(sa), .z(za));
  gf2sr_ffnet #(.K(3), .FN(r_fn(3))) dut_r3 (.x(xb), .y(yb), .s(sb3), .z(zb3));
  gf2sr_ffnet #(.K(3), .FN(r_fn(4))) dut_r4 (.x(xb), .y(yb), .s(sb4), .z(zb4));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:1] es;
    // 3-stage examples, exhaustive
    for (int v = 0; v < 16; v++) begin
      {yb, xb} = v[3:0];
      #1;
      check("R3 s", 32'(sb3), 32'({yb[2], ~yb[1], xb}));
      check("R3 z", 32'(zb3), 32'(1'(yb[3] ^ (~yb[1] | yb[2]))));
      check("R4 s", 32'(sb4), 32'({yb[2] ^ (xb & ~yb[1]), yb[1], xb}));
      check("R4 z", 32'(zb4), 32'(yb[3] ^ yb[1]));
    end
    // 16-stage example, random vectors plus the corner cases
    for (int n = 0; n < 2000; n++) begin
      if (n == 0)      {ya, xa} = '0;
      else if (n == 1) {ya, xa} = '1;
      else begin
        ya = 16'($urandom);
        xa = 1'($urandom);
      end
      #1;
      es = {ya[15:1], xa};
      es[8]  = ya[7] ^ (ya[1] & ya[4]);
      es[10] = ~ya[9];
      es[16] = ya[15] ^ (~ya[9] | ya[12]);
      check("A1 s", 32'(sa), 32'(es));
      check("A1 z", 32'(za), 32'(ya[16]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
