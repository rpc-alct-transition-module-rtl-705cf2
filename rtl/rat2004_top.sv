// rat2004_top -- the RAT2004 RPC/ALCT transition module.
//
// The board sits behind the TMB (trigger mother board) and does two separate
// jobs:
//  * RPC: up to four RPC link boards send 19 bits each at 40 MHz. The RPC mux
//    FPGA latches them on a selectable clock edge, moves them to the TMB
//    clock and sends the 76 bits over 38 lines at 80 MHz (rpc_tx, backplane
//    pins rpc_rx0..31 and rpc_in32..37). rpc_sync turns the lines into a
//    0-then-1 alignment pattern.
//  * ALCT: the cable drivers and receivers pass the TMB<->ALCT signals
//    through unchanged, in normal mode (21 out, 29 in) or loopback mode
//    (25 out, 25 in).
// The eight front-panel LEDs show the four RPC clock detectors, then the ALCT
// Tx cable, ALCT Rx cable, ALCT cable error and RPC cable error states. The
// last four have no described detection logic and come in as ports.
//
// Parts that are not logic are outside: the configuration PROM, the external
// delay chip that aligns the RPC clocks with the TMB clock, the FPGA DLL (the
// doubled clock clk80 is a port), the LVDS electrical layer and the jumpers.
//
// Timing: see rpc_mux_fpga (RPC path, registered) and alct_transceiver (ALCT
// path, combinational). hard_reset clears the FPGA logic asynchronously.
module rat2004_top
  import rat_pkg::*;
#(
  parameter int unsigned NRPC = rat_pkg::RPC_LINKS,
  localparam int unsigned TX_W = NRPC * RPC_WORD_W / 2
) (
  // RPC link boards (J1..J4)
  input  logic [NRPC-1:0]                 rpc_clk,
  input  logic [NRPC-1:0][RPC_DATA_W-1:0] rpc_data,
  input  logic [NRPC-1:0][RPC_BXN_W-1:0]  rpc_bxn,
  // TMB, RPC part of backplane P3B
  input  logic                            clk40,
  input  logic                            clk80,
  input  logic                            hard_reset,
  input  logic                            rpc_posneg,
  input  logic                            rpc_sync,
  output logic [TX_W-1:0]                 rpc_tx,
  output logic                            rpc_phase,
  // TMB, ALCT part of backplane P3B
  input  logic [ALCT_TX_W-1:0]            alct_tx,
  input  logic                            alct_clock,
  input  logic                            alct_clk_en,
  input  logic                            alct_oe,
  input  logic                            txoe,
  input  logic                            alct_loop,
  output logic [ALCT_RX_W-1:0]            alct_rx,
  output logic                            alct_rx_oe,
  // ALCT cables (J5 = cable A, J6 = cable B)
  input  logic [ALCT_PAIRS-1:0]           cable_a_in,
  output logic [ALCT_PAIRS-1:0]           cable_b_out,
  output logic [ALCT_PAIRS-1:0]           cable_b_oe,
  input  logic [ALCT_BIDIR-1:0]           cable_b_in,
  // states of the LEDs whose detection is not part of this design
  input  logic                            alct_tx_cable_ok,
  input  logic                            alct_rx_cable_ok,
  input  logic                            alct_cable_err,
  input  logic                            rpc_cable_err,
  // front panel
  output logic [7:0]                      led
);

  logic [NRPC-1:0] rpc_clk_ok;

  rpc_mux_fpga #(.NRPC(NRPC)) u_fpga (
    .rpc_clk    (rpc_clk),
    .rpc_data   (rpc_data),
    .rpc_bxn    (rpc_bxn),
    .clk40      (clk40),
    .clk80      (clk80),
    .hard_reset (hard_reset),
    .rpc_posneg (rpc_posneg),
    .rpc_sync   (rpc_sync),
    .rpc_tx     (rpc_tx),
    .rpc_phase  (rpc_phase),
    .rpc_clk_ok (rpc_clk_ok)
  );

  alct_transceiver u_alct (
    .alct_tx     (alct_tx),
    .alct_clock  (alct_clock),
    .alct_clk_en (alct_clk_en),
    .alct_oe     (alct_oe),
    .txoe        (txoe),
    .alct_loop   (alct_loop),
    .alct_rx     (alct_rx),
    .alct_rx_oe  (alct_rx_oe),
    .cable_a_in  (cable_a_in),
    .cable_b_out (cable_b_out),
    .cable_b_oe  (cable_b_oe),
    .cable_b_in  (cable_b_in)
  );

  // LEDs 0..3: RPC clocks (links beyond NRPC read as absent).
  always_comb begin
    led[3:0] = '0;
    for (int n = 0; n < NRPC && n < 4; n++) led[n] = rpc_clk_ok[n];
    led[7:4] = {rpc_cable_err, alct_cable_err, alct_rx_cable_ok, alct_tx_cable_ok};
  end

endmodule
