// rpc_mux_fpga -- the RAT's RPC multiplexer FPGA.
//
// Up to NRPC RPC link boards each send 16 data bits, a 3-bit bunch-crossing
// number and their own 40 MHz clock. The FPGA processes them in three steps,
// as the board description lays out:
//   1. latch each link's word on the rising or falling edge of its clock
//      (rpc_posneg selects the edge for all links);
//   2. re-register all words on the TMB's 40 MHz clock;
//   3. send the NRPC*19 bits over NRPC*19/2 lines at 80 MHz, lower half first.
// This halves the number of TMB FPGA pins the RPC data needs (76 bits on 38
// lines for four links). rpc_sync=1 replaces the data by 0 in the first
// 12.5 ns phase and 1 in the second, for aligning the TMB's receiver. Each
// link also drives a "clock detected" front-panel LED.
//
// NRPC must be even. Bit order (this design's choice): link n's word is {bxn, data} and occupies
// bits [19n+18:19n] of the 76-bit word, so links 0 and 1 go out in the first
// phase and links 2 and 3 in the second (for NRPC = 4).
//
// Timing: a word latched by link clock edges before TMB clock edge n-1 is
// re-registered at edge n-1 and sent in the 25 ns after edge n. clk80 must be
// the doubled TMB clock with rising edges at both clk40 edges. hard_reset
// clears all registers, as the FPGA reload on a TMB hard reset would.
module rpc_mux_fpga
  import rat_pkg::*;
#(
  parameter int unsigned NRPC           = rat_pkg::RPC_LINKS,
  parameter int unsigned CLKDET_TIMEOUT = 255,
  localparam int unsigned WORDS_W       = NRPC * RPC_WORD_W,
  localparam int unsigned TX_W          = WORDS_W / 2
) (
  input  logic [NRPC-1:0]                 rpc_clk,
  input  logic [NRPC-1:0][RPC_DATA_W-1:0] rpc_data,
  input  logic [NRPC-1:0][RPC_BXN_W-1:0]  rpc_bxn,
  input  logic                            clk40,
  input  logic                            clk80,
  input  logic                            hard_reset,
  input  logic                            rpc_posneg,
  input  logic                            rpc_sync,
  output logic [TX_W-1:0]                 rpc_tx,
  output logic                            rpc_phase,
  output logic [NRPC-1:0]                 rpc_clk_ok
);

  if (NRPC % 2 != 0) begin : g_bad_nrpc
    $error("rpc_mux_fpga: NRPC must be even so the words split into two equal halves");
  end

  rpc_word_t [NRPC-1:0] latched;
  logic [WORDS_W-1:0]   synced;

  for (genvar n = 0; n < NRPC; n++) begin : g_link
    rpc_latch #(.W(RPC_WORD_W)) u_latch (
      .rpc_clk (rpc_clk[n]),
      .rst     (hard_reset),
      .posneg  (rpc_posneg),
      .din     ({rpc_bxn[n], rpc_data[n]}),
      .dout    (latched[n])
    );

    rpc_clk_detect #(.TIMEOUT(CLKDET_TIMEOUT)) u_clkdet (
      .rpc_clk  (rpc_clk[n]),
      .clk40    (clk40),
      .rst      (hard_reset),
      .detected (rpc_clk_ok[n])
    );
  end

  rpc_sync #(.W(WORDS_W)) u_sync (
    .clk40 (clk40),
    .rst   (hard_reset),
    .d     (latched),
    .q     (synced)
  );

  rpc_mux80 #(.W(TX_W)) u_mux (
    .clk40    (clk40),
    .clk80    (clk80),
    .rst      (hard_reset),
    .rpc_sync (rpc_sync),
    .d        (synced),
    .tx       (rpc_tx),
    .phase    (rpc_phase)
  );

endmodule
