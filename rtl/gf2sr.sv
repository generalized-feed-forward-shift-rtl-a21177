// gf2sr: K-stage generalized feed-forward shift register used as a scan
// register.
//
// Each stage is a scan flip-flop: with scan_en high it shifts, taking the
// value y_{i-1} ^ f_{i-1} from the feed-forward network (gf2sr_ffnet); with
// scan_en low it captures its normal-mode data d[i]. Reading serially, the
// register behaves like a shift register that scrambles the data: a bit that
// enters at x leaves at z exactly K clocks later, xor-ed with a function of
// the K inputs that followed it. Scan-in and scan-out therefore take K clocks
// each and can overlap, as in a conventional scan chain, but the bits seen at
// z are not the register contents.
//
// Timing: y is registered on the rising edge of clk; z is combinational from
// y and x (through f_K). rst_n is a synchronous, active-low reset of all
// stages to zero. Replacing the plain shift path of a scan register by a
// GF2SR follows the original scheme; the synchronous reset and port names are
// this design's own.
module gf2sr
  import gf2sr_pkg::*;
#(
  parameter int unsigned K  = 16,
  parameter ffn_t [K:0]  FN = FIG_A1_FN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_en,  // 1: shift, 0: capture d
  input  logic       x,        // serial (scan) input
  input  logic [K:1] d,        // normal-mode data
  output logic [K:1] y,        // register contents
  output logic       z         // serial (scan) output
);

  logic [K:1] s;

  gf2sr_ffnet #(.K(K), .FN(FN)) u_ffnet (
    .x (x),
    .y (y),
    .s (s),
    .z (z)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)       y <= '0;
    else if (scan_en) y <= s;
    else              y <= d;
  end

endmodule
