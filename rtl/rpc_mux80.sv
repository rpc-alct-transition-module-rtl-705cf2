// rpc_mux80 -- 2-to-1 time multiplexer from 2*W bits at 40 MHz to W lines at
// 80 MHz, with the synchronisation pattern used to align the TMB receiver.
//
// Each 25 ns period of clk40 is split into two 12.5 ns phases. In the first
// phase, which starts at the rising edge of clk40, tx carries d[W-1:0]; in the
// second it carries d[2W-1:W]. Both halves come from the same clk40 cycle: the
// first-phase update also stores the upper half in a holding register that is
// put out at the mid-period edge. With rpc_sync=1 every line is 0 in the first
// phase and 1 in the second, a square wave the TMB can use to find the phase
// boundary. The 2-to-1 multiplexing and the 0/1 sync pattern follow the board
// description; which half goes first is this design's choice.
//
// Clocks: clk80 must have rising edges at both edges of clk40 (a doubled
// clock from the FPGA's DLL). The phase is found without sampling the clock as
// data: a flag toggles on every clk40 rising edge and a clk80 copy of it lags by
// one 80 MHz cycle, so the two differ only at the mid-period edge.
//
// Timing: the value d holds just before clk40 rising edge n is sent during
// the 25 ns that follow edge n: lower half for 12.5 ns, then upper half. tx is
// a clk80 register. phase is 0 while the lower half (or the sync 0) is out and
// 1 during the upper half. rst clears everything asynchronously.
module rpc_mux80 #(
  parameter int unsigned W = 38
) (
  input  logic           clk40,
  input  logic           clk80,
  input  logic           rst,
  input  logic           rpc_sync,
  input  logic [2*W-1:0] d,
  output logic [W-1:0]   tx,
  output logic           phase
);

  logic         t40;      // toggles at every clk40 rising edge
  logic         t40_80;   // t40 copied on clk80
  logic         second;   // this clk80 edge starts the second phase
  logic [W-1:0] hold;     // upper half waiting for the second phase

  always_ff @(posedge clk40 or posedge rst)
    if (rst) t40 <= 1'b0;
    else     t40 <= ~t40;

  assign second = t40 ^ t40_80;

  always_ff @(posedge clk80 or posedge rst)
    if (rst) begin
      t40_80 <= 1'b0;
      hold   <= '0;
      tx     <= '0;
      phase  <= 1'b1;
    end else begin
      t40_80 <= t40;
      phase  <= second;
      if (!second) begin
        tx   <= rpc_sync ? '0 : d[W-1:0];
        hold <= d[2*W-1:W];
      end else begin
        tx   <= rpc_sync ? '1 : hold;
      end
    end

  // Clocking rule: with clk80 at twice clk40 and edge-aligned, a second-phase
  // edge is always followed by a first-phase edge. A clk80 that is not the
  // doubled clk40 breaks this.
  a_phase_alternates: assert property (
    @(posedge clk80) disable iff (rst) second |=> !second
  ) else $error("rpc_mux80: clk80 is not aligned at twice the clk40 rate");

endmodule
