// rpc_sync_tb -- self-checking test of rpc_sync: q must equal the d that was
// present at the previous rising edge of clk40, with all 76 bits moving
// together, and reset must clear it. d changes twice per clock period so that
// a register on the wrong edge would be seen.
`timescale 1ns/1ps
module rpc_sync_tb;
  localparam int unsigned W = 76;

  logic         clk40 = 1'b0;
  logic         rst   = 1'b1;
  logic [W-1:0] d     = '0;
  logic [W-1:0] q;
  logic [W-1:0] prev;

  int checks = 0, failures = 0;

  rpc_sync #(.W(W)) dut (.*);

  always #12.5 clk40 = ~clk40;

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = {$urandom, $urandom, $urandom};
    #30;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset: q=%h", q); end
    @(negedge clk40) rst = 0;
    for (int i = 0; i < 300; i++) begin
      #3 d = {$urandom, $urandom, $urandom};   // changes while clk40 is high
      @(negedge clk40);
      #3 d = {$urandom, $urandom, $urandom};   // and again while it is low
      prev = d;
      @(posedge clk40);
      #1;
      checks++;
      if (q !== prev) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", i, q, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
