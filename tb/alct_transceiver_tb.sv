// alct_transceiver_tb -- self-checking test of alct_transceiver.
//
// Random backplane and cable values are applied in all eight combinations of
// alct_loop, alct_oe and txoe. The expected cable and backplane vectors are
// built here bit by bit from the pair table (cable B pairs 1..19 from
// alct_tx[0..18], pair 20 clock_en, pair 21 clock, pairs 22..25 out only in
// loopback; cable A to alct_rx[0..24]; cable B returns to alct_rx[25..28] in
// normal mode). It also counts the transmitted and received bits per mode:
// 21 out / 29 in normal, 25 out / 25 in loopback.
`timescale 1ns/1ps
module alct_transceiver_tb;
  import rat_pkg::*;

  logic [ALCT_TX_W-1:0]  alct_tx;
  logic                  alct_clock, alct_clk_en, alct_oe, txoe, alct_loop;
  logic [ALCT_RX_W-1:0]  alct_rx;
  logic                  alct_rx_oe;
  logic [ALCT_PAIRS-1:0] cable_a_in, cable_b_out, cable_b_oe;
  logic [ALCT_BIDIR-1:0] cable_b_in;

  int checks = 0, failures = 0;

  alct_transceiver dut (.*);

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (loop=%b oe=%b txoe=%b)", what, got, exp,
               alct_loop, alct_oe, txoe);
    end
  endtask

  initial begin
    logic [24:0] exp_b, exp_boe;
    logic [31:0] exp_rx;
    int n_out, n_in;
    for (int i = 0; i < 400; i++) begin
      {alct_loop, alct_oe, txoe} = 3'(i % 8);
      alct_tx     = ALCT_TX_W'($urandom);
      alct_clock  = 1'($urandom);
      alct_clk_en = 1'($urandom);
      cable_a_in  = ALCT_PAIRS'($urandom);
      cable_b_in  = ALCT_BIDIR'($urandom);
      #1;
      // reference: pair p (1-based) of cable B
      exp_b = '0; exp_boe = '0;
      for (int p = 1; p <= 25; p++) begin
        logic v, e;
        if (p <= 19)      v = alct_tx[p-1];
        else if (p == 20) v = alct_clk_en;
        else if (p == 21) v = alct_clock;
        else              v = alct_tx[p-3];
        e = alct_oe && (p <= 21 || alct_loop);
        exp_boe[p-1] = e;
        exp_b[p-1]   = e & v;
      end
      exp_rx = '0;
      if (txoe) begin
        for (int p = 1; p <= 25; p++) exp_rx[p-1] = cable_a_in[p-1];
        if (!alct_loop)
          for (int p = 22; p <= 25; p++) exp_rx[p+3] = cable_b_in[p-22];
      end
      check_vec(32'(cable_b_out), 32'(exp_b), "cable B out");
      check_vec(32'(cable_b_oe), 32'(exp_boe), "cable B enables");
      check_vec(alct_rx, exp_rx, "alct_rx");
      check_vec(32'(alct_rx_oe), 32'(txoe), "alct_rx_oe");
      if (alct_oe && txoe) begin
        n_out = $countones(cable_b_oe);
        n_in  = alct_loop ? 25 : 29;
        checks++;
        if (n_out != (alct_loop ? 25 : 21)) begin
          failures++; $display("FAIL %0d pairs out, loop=%b", n_out, alct_loop);
        end
        // received bits: every input bit must reach alct_rx in this mode
        for (int b = 0; b < 29; b++) begin
          if (b < n_in) begin
            logic src;
            src = (b < 25) ? cable_a_in[b] : cable_b_in[b-25];
            checks++;
            if (alct_rx[b] !== src) begin
              failures++; $display("FAIL rx bit %0d loop=%b", b, alct_loop);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
