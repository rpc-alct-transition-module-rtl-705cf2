// alct_transceiver -- logical model of the RAT's ALCT cable drivers and
// receivers.
//
// The RAT converts the TMB's LVTTL signals to LVDS for the ALCT and the ALCT's
// LVDS signals back to LVTTL; it never changes the bits. Cable A (J5) brings
// 25 pairs from the ALCT. Cable B (J6) sends 21 pairs to the ALCT and, in
// normal mode, returns four more (tdo, reserved_out0/1 and
// active_feb_flag, each time-multiplexed where the pair carries two signals).
// So normal mode sends 21 and receives 29 bits. In loopback mode, used by the
// TMB to test itself with a cable from J6 to J5, the four return pairs of
// cable B turn round and transmit too: 25 bits go out and the 25 bits of
// cable A come back. This module models only logic levels and directions; the
// LVDS electrical layer is outside it. The mode counts and pair directions
// follow the board description; the mapping of backplane bits to pairs and
// the meaning of the enable pins are this design's choice:
//
//   cable B pairs 1..19   <- alct_tx[18:0]    (tdi ... /hard_reset)
//   cable B pair 20       <- alct_clk_en      (clock_en)
//   cable B pair 21       <- alct_clock       (clock)
//   cable B pairs 22..25  <- alct_tx[22:19]   loopback only
//   alct_rx[24:0]         <- cable A pairs 1..25
//   alct_rx[28:25]        <- cable B pairs 22..25, normal mode only (else 0)
//   alct_rx[31:29]        =  0; alct_tx[23] is a spare and is not used
//
// alct_oe enables the cable B transmitters; txoe enables the drivers toward
// the TMB. A disabled output reads 0 here and its enable is low.
// Pair i of a cable is bit i-1 of the cable vectors.
//
// Timing: purely combinational; the 80 MHz multiplexing is done at both ends
// of the cables, not on the RAT.
module alct_transceiver
  import rat_pkg::*;
(
  // TMB side (backplane P3B)
  input  logic [ALCT_TX_W-1:0]  alct_tx,
  input  logic                  alct_clock,
  input  logic                  alct_clk_en,
  input  logic                  alct_oe,
  input  logic                  txoe,
  input  logic                  alct_loop,
  output logic [ALCT_RX_W-1:0]  alct_rx,
  output logic                  alct_rx_oe,
  // ALCT side (cable A = J5, cable B = J6)
  input  logic [ALCT_PAIRS-1:0] cable_a_in,
  output logic [ALCT_PAIRS-1:0] cable_b_out,
  output logic [ALCT_PAIRS-1:0] cable_b_oe,
  input  logic [ALCT_BIDIR-1:0] cable_b_in
);

  localparam int unsigned NFIX = ALCT_TX_PAIRS - 2;  // 19 pairs from alct_tx

  logic [ALCT_PAIRS-1:0] b_value;
  logic [ALCT_PAIRS-1:0] b_dir_out;
  logic [ALCT_RX_W-1:0]  rx_value;

  always_comb begin
    b_value   = {alct_tx[NFIX +: ALCT_BIDIR], alct_clock, alct_clk_en, alct_tx[NFIX-1:0]};
    b_dir_out = {{ALCT_BIDIR{alct_loop}}, {ALCT_TX_PAIRS{1'b1}}};

    cable_b_oe  = alct_oe ? b_dir_out : '0;
    cable_b_out = b_value & cable_b_oe;

    rx_value = '0;
    rx_value[ALCT_PAIRS-1:0] = cable_a_in;
    if (!alct_loop)
      rx_value[ALCT_PAIRS +: ALCT_BIDIR] = cable_b_in;

    alct_rx_oe = txoe;
    alct_rx    = txoe ? rx_value : '0;
  end

  // alct_tx[23] is a spare backplane line with no cable pair.
  logic unused_spare;
  assign unused_spare = ^alct_tx[ALCT_TX_W-1:NFIX+ALCT_BIDIR];

endmodule
