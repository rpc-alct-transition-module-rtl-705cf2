// rpc_mux_fpga_tb -- self-checking test of the RPC multiplexer FPGA.
//
// Four links share a 40 MHz clock whose rising edges lie 8 ns after those of
// the TMB clock; each link's word changes 1 ns after its rising edge, so word
// W[k] is on the cable during 25k+9 .. 25k+34 ns. Counting clk40 rising edges
// m at 25m ns, the test expects during the 25 ns after edge m:
//   posneg = 0 (rising-edge latch):  the words W[m-3]
//   posneg = 1 (falling-edge latch): the words W[m-2]
// with links 0 and 1 in the first 12.5 ns ({bxn,data} of link 0 in the low 19
// bits) and links 2 and 3 in the second. It also runs the rpc_sync pattern and
// stops link 2's clock to see its clock-detected output drop while the
// others stay on.
`timescale 1ns/1ps
module rpc_mux_fpga_tb;
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
  logic [NRPC-1:0] rpc_clk_ok;

  logic [NRPC-1:0][18:0] words [NW];

  int checks = 0, failures = 0;

  rpc_mux_fpga dut (.*);

  assign rpc_clk = {NRPC{link_clk}} & link_run;

  initial forever begin
    clk80 = 1'b1; clk40 = 1'b1; #6.25;
    clk80 = 1'b0;               #6.25;
    clk80 = 1'b1; clk40 = 1'b0; #6.25;
    clk80 = 1'b0;               #6.25;
  end
  initial begin #8; forever begin link_clk = 1'b1; #12.5; link_clk = 1'b0; #12.5; end end

  // link data source: W[k] applied at 25k+9 ns
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

  task automatic expect_tx(input logic [37:0] exp, input logic ph, input string what, input int m);
    checks++;
    if (rpc_tx !== exp || rpc_phase !== ph) begin
      failures++;
      $display("FAIL %s edge %0d: tx=%h expected %h phase=%b", what, m, rpc_tx, exp, rpc_phase);
    end
  endtask

  initial begin
    int k;
    #40 hard_reset = 1'b0;
    for (int m = 2; m < NW - 4; m++) begin
      // settings change just after a clk40 rising edge; the next 4 edges are not checked
      if (m == 200) rpc_posneg = 1'b1;
      if (m == 330) rpc_sync   = 1'b1;
      if (m == 360) rpc_sync   = 1'b0;
      if (m == 400) link_run[2] = 1'b0;
      #(25.0 * m + 9 - $realtime);          // 9 ns into the first phase after edge m
      k = m - (rpc_posneg ? 2 : 3);
      if (m >= 6 && !(m >= 200 && m < 204) && !(m >= 360 && m < 364) && m < 400) begin
        if (rpc_sync && m > 330) begin
          expect_tx('0, 1'b0, "sync 0", m);
          #12.5 expect_tx('1, 1'b1, "sync 1", m);
        end else if (!rpc_sync) begin
          expect_tx({words[k][1], words[k][0]}, 1'b0, "first phase", m);
          #12.5 expect_tx({words[k][3], words[k][2]}, 1'b1, "second phase", m);
        end
      end
      if (m == 390 || m == int'(NW) - 6) begin
        checks++;
        if (rpc_clk_ok !== (m == 390 ? 4'b1111 : 4'b1011)) begin
          failures++; $display("FAIL clock detect at edge %0d: %b", m, rpc_clk_ok);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
