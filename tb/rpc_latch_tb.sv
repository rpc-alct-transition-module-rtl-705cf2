// rpc_latch_tb -- self-checking test of rpc_latch.
//
// The link word changes twice per 25 ns clock period, once while the clock is
// high and once while it is low, so the rising-edge and falling-edge registers
// hold different values. After each falling edge the test reads dout with
// posneg=0 (expects the word present at the rising edge) and posneg=1
// (expects the word present at the falling edge). Reset is checked first.
`timescale 1ns/1ps
module rpc_latch_tb;
  localparam int unsigned W = 19;

  logic         rpc_clk = 1'b0;
  logic         rst     = 1'b1;
  logic         posneg  = 1'b0;
  logic [W-1:0] din     = '0;
  logic [W-1:0] dout;

  int checks = 0, failures = 0;

  rpc_latch #(.W(W)) dut (.*);

  always #12.5 rpc_clk = ~rpc_clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: dout=%h expected %h at %0t", what, dout, exp, $time);
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b;
    din = W'(19'h5A5A5);
    #30;
    posneg = 0; #1 check('0, "reset rise");
    posneg = 1; #1 check('0, "reset fall");
    @(negedge rpc_clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge rpc_clk);
      #6;
      a = W'($urandom);
      din = a;                 // present at the next rising edge
      @(posedge rpc_clk);
      #6;
      b = W'($urandom);
      din = b;                 // present at the next falling edge
      @(negedge rpc_clk);
      #2;
      posneg = 0; #1 check(a, "rising edge");
      posneg = 1; #1 check(b, "falling edge");
      posneg = 1'($urandom);
    end
    // asynchronous reset mid-cycle
    #3 rst = 1; #1;
    posneg = 0; #1 check('0, "async reset rise");
    posneg = 1; #1 check('0, "async reset fall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
