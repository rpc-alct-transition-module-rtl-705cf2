// rpc_clk_detect_tb -- self-checking test of rpc_clk_detect (TIMEOUT = 20).
//
// The link clock runs at 40 MHz with a 7 ns offset from the TMB clock and is
// gated on and off. Expected, counted in TMB clock cycles: detected stays low
// while the link clock is stopped, rises within 4 cycles of the first link
// edge, stays high while it runs, stays high for at least TIMEOUT-1 cycles
// after the last edge and is low again within TIMEOUT+4 cycles.
`timescale 1ns/1ps
module rpc_clk_detect_tb;
  localparam int unsigned TIMEOUT = 20;

  logic clk40 = 1'b0, free_clk = 1'b0, run = 1'b0;
  logic rst = 1'b1;
  logic rpc_clk;
  logic detected;

  int checks = 0, failures = 0;

  assign rpc_clk = free_clk & run;

  rpc_clk_detect #(.TIMEOUT(TIMEOUT)) dut (.*);

  always #12.5 clk40 = ~clk40;
  initial begin #7; forever #12.5 free_clk = ~free_clk; end

  task automatic expect_det(input logic exp, input string what);
    checks++;
    if (detected !== exp) begin
      failures++;
      $display("FAIL %s: detected=%b at %0t", what, detected, $time);
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
    int rise_at, fall_at;
    #30 rst = 0;
    for (int k = 0; k < 3; k++) begin
      // stopped: never detected
      repeat (2 * TIMEOUT) begin
        @(posedge clk40) #1 expect_det(1'b0, "stopped");
      end
      // start the link clock at a falling edge of the free clock
      @(negedge free_clk) run = 1'b1;
      rise_at = -1;
      for (int c = 0; c < 8; c++) begin
        @(posedge clk40) #1;
        if (detected && rise_at < 0) rise_at = c;
      end
      checks++;
      if (rise_at < 0 || rise_at > 4) begin
        failures++; $display("FAIL rise after %0d cycles", rise_at);
      end
      repeat (100 + 37 * k) begin
        @(posedge clk40) #1 expect_det(1'b1, "running");
      end
      @(negedge free_clk) run = 1'b0;
      fall_at = -1;
      for (int c = 0; c < TIMEOUT + 8; c++) begin
        @(posedge clk40) #1;
        if (!detected && fall_at < 0) fall_at = c;
      end
      checks++;
      if (fall_at < int'(TIMEOUT) - 1 || fall_at > int'(TIMEOUT) + 4) begin
        failures++; $display("FAIL fall after %0d cycles", fall_at);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
