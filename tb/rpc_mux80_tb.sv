// rpc_mux80_tb -- self-checking test of rpc_mux80.
//
// clk80 and clk40 come from one process so that every clk40 edge coincides
// with a clk80 rising edge. d changes 3 ns after each clk40 rising edge. For
// the value D that d holds just before clk40 edge n, the test expects tx =
// D[37:0] and phase = 0 in the 12.5 ns after edge n and tx = D[75:38], phase =
// 1 in the next 12.5 ns: two different words per 25 ns, i.e. 80 MHz. With
// rpc_sync = 1 it expects all zeros, then all ones.
`timescale 1ns/1ps
module rpc_mux80_tb;
  localparam int unsigned W = 38;

  logic           clk40 = 1'b0, clk80 = 1'b0;
  logic           rst = 1'b1;
  logic           rpc_sync = 1'b0;
  logic [2*W-1:0] d = '0;
  logic [W-1:0]   tx;
  logic           phase;

  int checks = 0, failures = 0;
  int sync_periods = 0;

  rpc_mux80 #(.W(W)) dut (.*);

  initial forever begin
    clk80 = 1'b1; clk40 = 1'b1; #6.25;
    clk80 = 1'b0;               #6.25;
    clk80 = 1'b1; clk40 = 1'b0; #6.25;
    clk80 = 1'b0;               #6.25;
  end

  task automatic expect_tx(input logic [W-1:0] exp, input logic exp_phase, input string what);
    checks++;
    if (tx !== exp || phase !== exp_phase) begin
      failures++;
      $display("FAIL %s: tx=%h phase=%b expected %h/%b at %0t", what, tx, phase, exp, exp_phase, $time);
    end
  endtask

  initial begin : watchdog
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*W-1:0] held;
    #3;
    checks++;
    if (tx !== '0) begin failures++; $display("FAIL reset tx=%h", tx); end
    @(negedge clk40) rst = 0;
    @(posedge clk40) #3 d = {$urandom, $urandom, $urandom};
    for (int i = 0; i < 400; i++) begin
      if (i == 150) rpc_sync = 1'b1;
      if (i == 250) rpc_sync = 1'b0;
      held = d;                         // value present just before the next edge
      @(posedge clk40);
      #3 d = {$urandom, $urandom, $urandom};
      #6;                               // 9 ns into the first phase
      if (i >= 150 && i < 250) begin
        expect_tx('0, 1'b0, "sync first phase");
        #12.5 expect_tx('1, 1'b1, "sync second phase");
        sync_periods++;
      end else begin
        expect_tx(held[W-1:0], 1'b0, "first phase");
        #12.5 expect_tx(held[2*W-1:W], 1'b1, "second phase");
      end
      @(negedge clk40);
    end
    checks++;
    if (sync_periods != 100) begin
      failures++; $display("FAIL sync periods %0d", sync_periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
