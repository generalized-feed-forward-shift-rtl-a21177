// gf2sr_pkg: types, constructors and example configurations for generalized
// feed-forward shift registers (GF2SR).
//
// A k-stage GF2SR is a chain of k flip-flops y_1..y_k. The value shifted into
// stage i is y_{i-1} xor f_{i-1}, with y_0 = x (the serial input), and the
// output is z = y_k xor f_k. Each f_i is a logic function of x and of the
// stages in front of the tap, y_1..y_{i-1}; f_0 is a constant. Because no
// function looks at its own stage or a later one, every value entering the
// register leaves it k clocks later, xor-ed with a function of the later
// inputs: z(t+k) = x(t) xor f(x(t+1), ..., x(t+k)).
//
// Encoding (a choice of this RTL): every f_i is a look-up table of FN_IN
// inputs. Input m of the table is signal src[m], where source 0 is x and
// source j (1..k) is y_j. Table bit tt[idx] is the function value when bit m
// of idx equals the value of source src[m]. Four table inputs cover every
// example of the original description (none uses more than two variables);
// a table input whose source is not in front of the tap is allowed only if
// the table does not depend on it, which is checked at elaboration.
//
// Example configurations (the examples of the original description):
//   FIG_A1_FN  16 stages: FF8 = FF7 ^ (FF1 & FF4), FF10 = FF9 ^ 1,
//              FF16 = FF15 ^ (!FF9 | FF12), OUT = FF16.
//   r_fn(1)    R1, 3 stages, inversion-inserted linear feed-forward SR:
//              y2 <= ~y1, y3 <= y2 ^ x, z = y3.
//   r_fn(2)    R2: y3 <= y2 ^ (x & y1), z = y3.
//   r_fn(3)    R3: y2 <= ~y1, z = y3 ^ (~y1 | y2).
//   r_fn(4)    R4: y3 <= y2 ^ (x & ~y1), z = y3 ^ y1.
// R2, R3 and R4 all satisfy z(t+3) = x(t) ^ x(t+2) x(t+1).
package gf2sr_pkg;

  // Inputs per feed-forward function table.
  localparam int unsigned FN_IN = 4;
  localparam int unsigned TT_W  = 1 << FN_IN;

  // Source select: 0 = x, j = y_j.
  typedef logic [7:0] src_t;
  localparam src_t SRC_X = 8'd0;

  typedef struct packed {
    src_t [FN_IN-1:0] src;
    logic [TT_W-1:0]  tt;
  } ffn_t;

  // Constant function (f = v).
  function automatic ffn_t fn_const(logic v);
    ffn_t f;
    f.src = '0;
    f.tt  = v ? '1 : '0;
    return f;
  endfunction

  // Single literal: f = a, or ~a when na is set.
  function automatic ffn_t fn_lit(src_t a, logic na);
    ffn_t f;
    f.src = '0;
    f.src[0] = a;
    for (int i = 0; i < TT_W; i++) f.tt[i] = i[0] ^ na;
    return f;
  endfunction

  // Two-input AND of optionally inverted literals.
  function automatic ffn_t fn_and2(src_t a, logic na, src_t b, logic nb);
    ffn_t f;
    f.src = '0;
    f.src[0] = a;
    f.src[1] = b;
    for (int i = 0; i < TT_W; i++) f.tt[i] = (i[0] ^ na) & (i[1] ^ nb);
    return f;
  endfunction

  // Two-input OR of optionally inverted literals.
  function automatic ffn_t fn_or2(src_t a, logic na, src_t b, logic nb);
    ffn_t f;
    f.src = '0;
    f.src[0] = a;
    f.src[1] = b;
    for (int i = 0; i < TT_W; i++) f.tt[i] = (i[0] ^ na) | (i[1] ^ nb);
    return f;
  endfunction

  // True when table tt changes with its input m.
  function automatic logic fn_uses(logic [TT_W-1:0] tt, int unsigned m);
    logic uses = 1'b0;
    for (int i = 0; i < TT_W; i++)
      if (tt[i] != tt[i ^ (1 << m)]) uses = 1'b1;
    return uses;
  endfunction

  // 16-stage GF2SR of the design example (SR-ID
  // 16#;;;;;;;(FF1&FF4);;1;;;;;;(!FF9|FF12);). Index i holds f_i.
  function automatic ffn_t [16:0] fig_a1_fn();
    ffn_t [16:0] c;
    for (int i = 0; i <= 16; i++) c[i] = fn_const(1'b0);
    c[7]  = fn_and2(8'd1, 1'b0, 8'd4, 1'b0);   // FF8  = FF7  ^ (FF1 & FF4)
    c[9]  = fn_const(1'b1);                    // FF10 = FF9  ^ 1
    c[15] = fn_or2(8'd9, 1'b1, 8'd12, 1'b0);   // FF16 = FF15 ^ (!FF9 | FF12)
    return c;
  endfunction

  // 3-stage examples; which selects R1..R4.
  function automatic ffn_t [3:0] r_fn(int unsigned which);
    ffn_t [3:0] c;
    for (int i = 0; i <= 3; i++) c[i] = fn_const(1'b0);
    case (which)
      1: begin
        c[1] = fn_const(1'b1);                 // y2 = ~y1
        c[2] = fn_lit(SRC_X, 1'b0);            // y3 = y2 ^ x
      end
      2: c[2] = fn_and2(SRC_X, 1'b0, 8'd1, 1'b0);   // y3 = y2 ^ x y1
      3: begin
        c[1] = fn_const(1'b1);                 // y2 = ~y1
        c[3] = fn_or2(8'd1, 1'b1, 8'd2, 1'b0); // z = y3 ^ (~y1 | y2)
      end
      4: begin
        c[2] = fn_and2(SRC_X, 1'b0, 8'd1, 1'b1);   // y3 = y2 ^ x ~y1
        c[3] = fn_lit(8'd1, 1'b0);                 // z = y3 ^ y1
      end
      default: ;
    endcase
    return c;
  endfunction

  localparam ffn_t [16:0] FIG_A1_FN = fig_a1_fn();

endpackage
