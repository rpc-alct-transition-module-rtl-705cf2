// rat_pkg -- constants shared by the RAT2004 (RPC/ALCT transition module) logic.
//
// The RAT sits between up to four RPC link boards, the anode LCT board (ALCT)
// and the trigger mother board (TMB). Each RPC link delivers 16 data bits and
// a 3-bit bunch-crossing number at 40 MHz; the four 19-bit words (76 bits)
// leave the RAT on 38 lines at 80 MHz. The ALCT cables carry 25 LVDS pairs
// each. All numbers below follow the board description except the bit
// ordering of the link word, which is this design's choice.
package rat_pkg;

  localparam int unsigned RPC_LINKS  = 4;   // RPC link boards
  localparam int unsigned RPC_DATA_W = 16;  // data[15:0] per link
  localparam int unsigned RPC_BXN_W  = 3;   // bxn[2:0] per link
  localparam int unsigned RPC_WORD_W = RPC_DATA_W + RPC_BXN_W;  // 19
  localparam int unsigned RPC_TX_W   = RPC_LINKS * RPC_WORD_W / 2;  // 38 lines at 80 MHz

  localparam int unsigned ALCT_PAIRS    = 25; // pairs on each ALCT cable
  localparam int unsigned ALCT_TX_PAIRS = 21; // cable B pairs that always transmit
  localparam int unsigned ALCT_BIDIR    = ALCT_PAIRS - ALCT_TX_PAIRS; // cable B pairs 22..25
  localparam int unsigned ALCT_TX_W     = 24; // backplane alct_tx0..23
  localparam int unsigned ALCT_RX_W     = 32; // backplane alct_rx0..31

  // Pairs whose + and - legs are swapped on the board (bit i = pair i+1).
  // The RAT passes bits unchanged; the far end accounts for the swap.
  localparam logic [ALCT_PAIRS-1:0] J5_INVERTED = 25'h155_5555; // odd pairs 1..25
  localparam logic [ALCT_PAIRS-1:0] J6_INVERTED = 25'h14A_AAAA; // even pairs 2..20, 23, 25

  // One RPC link word as it is latched: bunch-crossing number above the data.
  typedef struct packed {
    logic [RPC_BXN_W-1:0]  bxn;
    logic [RPC_DATA_W-1:0] data;
  } rpc_word_t;

endpackage
