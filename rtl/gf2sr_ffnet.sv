// gf2sr_ffnet: the combinational feed-forward network of a K-stage GF2SR.
//
// For every tap i = 0..K a look-up table computes f_i from x and the stages
// in front of the tap (y_1..y_{i-1}); an XOR adds it to the shifted value.
// Outputs:
//   s[i] = y_{i-1} ^ f_{i-1}   value that stage i takes on a shift (y_0 = x)
//   z    = y_K ^ f_K           serial output
// The structure (one function and one XOR per stage boundary, functions fed
// only from earlier stages) follows the generalized feed-forward shift
// register; the table encoding of the functions is this design's own (see
// gf2sr_pkg). Elaboration fails if a table depends on a signal at or behind
// its own tap, which would create feedback.
// Purely combinational; the network lies only on the shift path, so it adds
// no delay to the normal (capture) path of a scan register.
module gf2sr_ffnet
  import gf2sr_pkg::*;
#(
  parameter int unsigned K  = 16,
  parameter ffn_t [K:0]  FN = FIG_A1_FN
) (
  input  logic       x,
  input  logic [K:1] y,
  output logic [K:1] s,
  output logic       z
);

  // v[0] = x, v[j] = y_j
  logic [K:0] v;
  logic [K:0] f;

  assign v = {y, x};

  for (genvar i = 0; i <= K; i++) begin : g_tap
    logic [FN_IN-1:0] idx;
    for (genvar m = 0; m < FN_IN; m++) begin : g_in
      localparam int unsigned SRC = int'(FN[i].src[m]);
      // A feed-forward function may use x and y_1..y_{i-1} only.
      if (fn_uses(FN[i].tt, m) && (SRC >= i)) begin : g_bad
        $error("gf2sr_ffnet: f_%0d input %0d reads source %0d, not in front of the tap",
               i, m, SRC);
      end
      if (SRC <= K) begin : g_sel
        assign idx[m] = v[SRC];
      end else begin : g_unused
        assign idx[m] = 1'b0;
      end
    end
    assign f[i] = FN[i].tt[idx];
  end

  assign s = v[K-1:0] ^ f[K-1:0];
  assign z = v[K] ^ f[K];

endmodule
