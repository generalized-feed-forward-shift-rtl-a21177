// reset_scan_guard: one extra flip-flop that prohibits scan-out after reset.
//
// A reset drives every scan flip-flop to a known state. Scanning that state
// out would let an observer learn how the GF2SR scrambles data, and from it
// the register structure. The guard flip-flop is set by reset and cleared by
// the first normal-mode clock (scan_en low, a capture). While it is set the
// scan output is forced to zero, so nothing can be observed between a reset
// and the first capture; shifting in still works, so a test (scan-in,
// capture, scan-out) is unaffected.
// The original scheme only states that one extra flip-flop prohibits
// scan-after-reset; setting on reset, clearing on capture and masking the
// output with an AND gate are this design's choices.
// Timing: blocked is registered; scan_out is combinational from chain_out.
module reset_scan_guard (
  input  logic clk,
  input  logic rst_n,      // synchronous, active low
  input  logic scan_en,
  input  logic chain_out,  // serial output of the scan chain
  output logic scan_out,   // serial output seen at the scan-out pin
  output logic blocked     // 1 between reset and the first capture
);

  always_ff @(posedge clk) begin
    if (!rst_n)        blocked <= 1'b1;
    else if (!scan_en) blocked <= 1'b0;
  end

  assign scan_out = chain_out & ~blocked;

  // Nothing leaves the chain between a reset and the first capture.
  a_blocked_silent: assert property (@(posedge clk) disable iff (!rst_n)
                                     blocked |-> !scan_out);

endmodule
