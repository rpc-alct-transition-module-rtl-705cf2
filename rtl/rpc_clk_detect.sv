// rpc_clk_detect -- "RPC clock detected" indicator for one link.
//
// A flip-flop toggles on every rising edge of the link clock. Its output is
// brought into the TMB clock domain through two flip-flops; every change seen
// there reloads a down-counter with TIMEOUT. detected is high while the counter
// is non-zero, so it drops TIMEOUT clk40 cycles after the link clock stops and
// rises two to three clk40 cycles after it starts. The LED itself comes from
// the board description; this detection scheme and TIMEOUT are this design's
// choice.
//
// Interface: rpc_clk (link clock), clk40 (TMB clock), rst (asynchronous),
// detected (to the front-panel LED driver).
module rpc_clk_detect #(
  parameter int unsigned TIMEOUT = 255
) (
  input  logic rpc_clk,
  input  logic clk40,
  input  logic rst,
  output logic detected
);

  localparam int unsigned CW = $clog2(TIMEOUT + 1);

  logic          tgl;
  logic [2:0]    sync;      // sync[0], sync[1]: synchroniser; sync[2]: previous
  logic [CW-1:0] count;

  always_ff @(posedge rpc_clk or posedge rst)
    if (rst) tgl <= 1'b0;
    else     tgl <= ~tgl;

  always_ff @(posedge clk40 or posedge rst)
    if (rst) begin
      sync  <= '0;
      count <= '0;
    end else begin
      sync <= {sync[1:0], tgl};
      if (sync[2] != sync[1])
        count <= CW'(TIMEOUT);
      else if (count != '0)
        count <= count - 1'b1;
    end

  assign detected = (count != '0);

endmodule
