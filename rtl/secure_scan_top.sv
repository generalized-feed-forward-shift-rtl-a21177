// secure_scan_top: scan chain of a circuit whose secret register is scanned
// through a generalized feed-forward shift register (GF2SR).
//
// The chain runs scan_in -> N_PLAIN conventional scan flip-flops -> K-stage
// GF2SR scan register (the secret register) -> scan-after-reset guard ->
// scan_out. The combinational logic of the circuit (the kernel) is outside:
// its next-state values enter at d_plain/d_secret and the register contents
// leave at q_plain/q_secret.
//
// Normal operation (scan_en low) captures d on every clock, with no extra
// delay on that path. In scan mode the chain shifts; because every GF2SR
// output bit is its input delayed K clocks and xor-ed with a function of
// later inputs, a full scan-in or scan-out takes N_PLAIN + K clocks, the same
// as a plain chain, and loading the next pattern overlaps unloading the last.
// A tester computes the scan-in sequence for a wanted state, and the captured
// state from the scan-out sequence, by logic implication from the known GF2SR
// structure; without that structure the scanned-out bits do not reveal the
// register contents. After a reset, scan_out stays zero until the first
// capture (reset_scan_guard), so a known reset state cannot be used to learn
// the structure.
// Placing the conventional part in front of the GF2SR and the size N_PLAIN
// are this design's choices; the GF2SR defaults to the 16-stage design
// example (gf2sr_pkg::FIG_A1_FN).
module secure_scan_top
  import gf2sr_pkg::*;
#(
  parameter int unsigned N_PLAIN = 16,
  parameter int unsigned K       = 16,
  parameter ffn_t [K:0]  FN      = FIG_A1_FN
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             scan_en,
  input  logic             scan_in,
  output logic             scan_out,
  output logic             scan_blocked,
  input  logic [N_PLAIN:1] d_plain,
  output logic [N_PLAIN:1] q_plain,
  input  logic [K:1]       d_secret,
  output logic [K:1]       q_secret
);

  logic plain_out;
  logic secret_out;

  scan_chain #(.N(N_PLAIN)) u_plain (
    .clk      (clk),
    .rst_n    (rst_n),
    .scan_en  (scan_en),
    .scan_in  (scan_in),
    .d        (d_plain),
    .q        (q_plain),
    .scan_out (plain_out)
  );

  gf2sr #(.K(K), .FN(FN)) u_secret (
    .clk     (clk),
    .rst_n   (rst_n),
    .scan_en (scan_en),
    .x       (plain_out),
    .d       (d_secret),
    .y       (q_secret),
    .z       (secret_out)
  );

  reset_scan_guard u_guard (
    .clk       (clk),
    .rst_n     (rst_n),
    .scan_en   (scan_en),
    .chain_out (secret_out),
    .scan_out  (scan_out),
    .blocked   (scan_blocked)
  );

endmodule
