// scan_chain: conventional scan chain segment of N scan flip-flops.
//
// Every flip-flop has a multiplexer in front of it that selects the normal
// data d[i] from the combinational logic (scan_en low) or the content of the
// preceding flip-flop (scan_en high); the first one takes scan_in. The last
// flip-flop drives scan_out, so a bit appears there N clocks after entering.
// This is the part of a scan design that is left unprotected.
// Timing: q is registered on the rising edge of clk; rst_n is a synchronous,
// active-low reset to zero (this design's choice).
module scan_chain #(
  parameter int unsigned N = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_en,
  input  logic       scan_in,
  input  logic [N:1] d,
  output logic [N:1] q,
  output logic       scan_out
);

  logic [N:1] shifted;

  if (N == 1) begin : g_one
    assign shifted = scan_in;
  end else begin : g_many
    assign shifted = {q[N-1:1], scan_in};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       q <= '0;
    else if (scan_en) q <= shifted;
    else              q <= d;
  end

  assign scan_out = q[N];

endmodule
