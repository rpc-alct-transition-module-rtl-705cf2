// rat2004_top_tb -- end-to-end test of the RAT2004 board at its default size
// (four RPC links, 38-line 80 MHz bus, 25-pair ALCT cables).
//
// RPC side: as in rpc_mux_fpga_tb, four links with a common 40 MHz clock 8 ns
// behind the TMB clock send a new word 1 ns after each link rising edge. In
// the 25 ns after TMB clock edge m the TMB must see W[m-3] (rising-edge
// latch, posneg = 0) or W[m-2] (falling-edge latch, posneg = 1): links 0 and
// 1 in the first 12.5 ns phase, links 2 and 3 in the second. The run also
// enables the rpc_sync 0/1 pattern, stops link 2's clock and finally applies a
// hard reset.
//
// ALCT side, running at the same time: in normal mode an ALCT model drives
// random values on cable A and on the four cable B return pairs; in loopback
// mode a cable connects cable B pair p to cable A pair p, and the TMB must
// get back on alct_rx[24:0] the 25 bits it sent. Driver enables are toggled
// too. The front-panel LEDs are checked throughout.
//
// Each mechanism is counted: rising- and falling-edge latching, 80 MHz
// words, sync-pattern periods, clock loss, normal and loopback transfers,
// disabled drivers and the hard reset. One that never occurs is a failure.
`timescale 1ns/1ps
module rat2004_top_tb;
  import rat_pkg::*;
  localparam int unsigned NRPC = 4;
  localparam int unsigned NW   = 800;

  logic [NRPC-1:0]                 rpc_clk;
  logic [NRPC-1:0][RPC_DATA_W-1:0] rpc_data = '0;
  logic [NRPC-1:0][RPC_BXN_W-1:0]  rpc_bxn  = '0;
  logic clk40 = 1'b0, clk80 = 1'b0, link_clk = 1'b0;
  logic hard_reset = 1'b1, rpc_posneg = 1'b0, rpc_sync = 1'b0;
  logic [NRPC-1:0] link_run = '1;
  logic [37:0]     rpc_tx;
  logic            rpc_phase;

  logic [ALCT_TX_W-1:0]  alct_tx = '0;
  logic alct_clock = 1'b0, alct_clk_en = 1'b0, alct_oe = 1'b1, txoe = 1'b1, alct_loop = 1'b0;
  logic [ALCT_RX_W-1:0]  alct_rx;
  logic                  alct_rx_oe;
  logic [ALCT_PAIRS-1:0] cable_a_in, cable_b_out, cable_b_oe;
  logic [ALCT_BIDIR-1:0] cable_b_in;
  logic [ALCT_PAIRS-1:0] alct_a_drive = '0;   // ALCT board driving cable A
  logic [ALCT_BIDIR-1:0] alct_b_drive = '0;   // ALCT board driving cable B returns
  logic alct_tx_cable_ok = 1'b0, alct_rx_cable_ok = 1'b0, alct_cable_err = 1'b0, rpc_cable_err = 1'b0;
  logic [7:0] led;

  logic [NRPC-1:0][18:0] words [NW];

  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0, n_sync = 0, n_clk_loss = 0, n_normal = 0, n_loop = 0;
  int n_drv_off = 0, n_reset = 0;

  rat2004_top dut (.*);

  // cable wiring: the ALCT in normal mode, a J6-to-J5 loopback cable otherwise
  assign cable_a_in = alct_loop ? cable_b_out : alct_a_drive;
  assign cable_b_in = alct_loop ? '0 : alct_b_drive;
  assign rpc_clk    = {NRPC{link_clk}} & link_run;

  initial forever begin
    clk80 = 1'b1; clk40 = 1'b1; #6.25;
    clk80 = 1'b0;               #6.25;
    clk80 = 1'b1; clk40 = 1'b0; #6.25;
    clk80 = 1'b0;               #6.25;
  end
  initial begin #8; forever begin link_clk = 1'b1; #12.5; link_clk = 1'b0; #12.5; end end

  initial begin
    for (int k = 0; k < NW; k++)
      for (int n = 0; n < NRPC; n++) words[k][n] = 19'($urandom);
    #9;
    for (int k = 0; k < NW; k++) begin
      for (int n = 0; n < NRPC; n++) {rpc_bxn[n], rpc_data[n]} = words[k][n];
      #25;
    end
  end

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail_if(input bit bad, input string what);
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- RPC path ----------------
  bit rpc_done = 0;
  initial begin
    int k;
    #40 hard_reset = 1'b0;
    for (int m = 2; m < int'(NW) - 4; m++) begin
      if (m == 200) rpc_posneg = 1'b1;
      if (m == 330) rpc_sync   = 1'b1;
      if (m == 360) rpc_sync   = 1'b0;
      if (m == 400) link_run[2] = 1'b0;
      #(25.0 * m + 9 - $realtime);
      k = m - (rpc_posneg ? 2 : 3);
      if (m >= 6 && !(m >= 200 && m < 204) && !(m >= 360 && m < 364) && m < 400) begin
        if (rpc_sync && m > 330) begin
          fail_if(rpc_tx !== '0 || rpc_phase !== 1'b0, "sync first phase");
          #12.5 fail_if(rpc_tx !== '1 || rpc_phase !== 1'b1, "sync second phase");
          n_sync++;
        end else if (!rpc_sync) begin
          fail_if(rpc_tx !== {words[k][1], words[k][0]} || rpc_phase !== 1'b0, "RPC first phase");
          #12.5 fail_if(rpc_tx !== {words[k][3], words[k][2]} || rpc_phase !== 1'b1, "RPC second phase");
          if (rpc_posneg) n_fall++; else n_rise++;
        end
      end
      if (m == 390) fail_if(led[3:0] !== 4'b1111, "all RPC clocks detected");
      if (m == int'(NW) - 6) begin
        fail_if(led[3:0] !== 4'b1011, "RPC 2 clock loss");
        if (led[2] === 1'b0) n_clk_loss++;
      end
    end
    // hard reset: FPGA outputs and clock LEDs clear
    hard_reset = 1'b1;
    #1 fail_if(rpc_tx !== '0 || led[3:0] !== 4'b0000, "hard reset");
    n_reset++;
    rpc_done = 1;
  end

  // ---------------- ALCT path ----------------
  initial begin
    logic [24:0] sent;
    #20;
    for (int i = 0; i < 700; i++) begin
      alct_loop = (i / 100) % 2 == 1;
      alct_oe   = (i % 37) != 5;
      txoe      = (i % 41) != 7;
      {alct_tx_cable_ok, alct_rx_cable_ok, alct_cable_err, rpc_cable_err} = 4'($urandom);
      alct_tx      = ALCT_TX_W'($urandom);
      alct_clock   = 1'($urandom);
      alct_clk_en  = 1'($urandom);
      alct_a_drive = ALCT_PAIRS'($urandom);
      alct_b_drive = ALCT_BIDIR'($urandom);
      #2;
      fail_if(led[7:4] !== {rpc_cable_err, alct_cable_err, alct_rx_cable_ok, alct_tx_cable_ok},
              "LEDs 4-7");
      sent = {alct_tx[22:19], alct_clock, alct_clk_en, alct_tx[18:0]};
      if (!alct_oe || !txoe) begin
        n_drv_off++;
        if (!alct_oe) fail_if(cable_b_oe !== '0 || cable_b_out !== '0, "cable B drivers off");
        if (!txoe)    fail_if(alct_rx !== '0 || alct_rx_oe !== 1'b0, "backplane drivers off");
      end else if (alct_loop) begin
        // 25 bits out and back through the loopback cable
        fail_if($countones(cable_b_oe) != 25, "loopback drives 25 pairs");
        fail_if(alct_rx !== {7'b0, sent}, "loopback data");
        n_loop++;
      end else begin
        fail_if($countones(cable_b_oe) != 21, "normal drives 21 pairs");
        fail_if(cable_b_out[20:0] !== sent[20:0], "normal transmit");
        fail_if(alct_rx !== {3'b0, alct_b_drive, alct_a_drive}, "normal receive 29 bits");
        n_normal++;
      end
      #23;
    end
    wait (rpc_done);
    fail_if(n_rise == 0,     "rising-edge latching never exercised");
    fail_if(n_fall == 0,     "falling-edge latching never exercised");
    fail_if(n_sync == 0,     "sync mode never exercised");
    fail_if(n_clk_loss == 0, "clock loss never exercised");
    fail_if(n_normal == 0,   "ALCT normal mode never exercised");
    fail_if(n_loop == 0,     "ALCT loopback never exercised");
    fail_if(n_drv_off == 0,  "driver disable never exercised");
    fail_if(n_reset == 0,    "hard reset never exercised");
    $display("mechanisms: rise=%0d fall=%0d sync=%0d clk_loss=%0d normal=%0d loop=%0d drv_off=%0d reset=%0d",
             n_rise, n_fall, n_sync, n_clk_loss, n_normal, n_loop, n_drv_off, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
