// rpc_latch -- input latch for one RPC link board.
//
// The link's 19-bit word ({bxn[2:0], data[15:0]}) is captured on the rising
// edge of the link's own 40 MHz clock by one register and on its falling edge
// by another; posneg picks which one drives dout (0 = rising edge, 1 = falling
// edge). Choosing the edge lets the TMB move the sampling point half a clock
// away from the data transitions. That the edge is selectable follows the board
// description; the polarity of posneg and the two-register structure are this
// design's choice.
//
// Timing: dout follows din one rpc_clk edge (of the selected kind) later.
// posneg is a static setting and may be changed at any time; the output then
// switches to the other register at once. rst clears both registers
// asynchronously (the FPGA is reloaded on a TMB hard reset).
module rpc_latch #(
  parameter int unsigned W = 19
) (
  input  logic         rpc_clk,
  input  logic         rst,
  input  logic         posneg,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] on_rise, on_fall;

  always_ff @(posedge rpc_clk or posedge rst)
    if (rst) on_rise <= '0;
    else     on_rise <= din;

  always_ff @(negedge rpc_clk or posedge rst)
    if (rst) on_fall <= '0;
    else     on_fall <= din;

  assign dout = posneg ? on_fall : on_rise;

endmodule
