// rpc_sync -- moves the latched RPC words into the TMB's 40 MHz clock domain.
//
// A single register stage clocked by the TMB clock. The RPC link clocks have
// the same frequency as the TMB clock; an external programmable delay chip
// sets the phase between them, so one stage samples the latched words when
// they are stable and all 76 bits cross together. Using one plain register
// (no multi-flop synchroniser) is this design's reading of that scheme.
//
// Timing: q = d as sampled at the previous rising edge of clk40. rst clears q
// asynchronously.
module rpc_sync #(
  parameter int unsigned W = 76
) (
  input  logic         clk40,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk40 or posedge rst)
    if (rst) q <= '0;
    else     q <= d;

endmodule
