// Self-checking testbench for sync_ff, the two-stage synchroniser.
//
// Checks: reset forces the output to RESET_VAL for both a 1-bit and a 4-bit
// instance; an input change that occurs before a falling clock edge appears at
// the output on the following rising edge (half a period later), and a change
// just after a falling edge appears one and a half periods later, which are
// the bounds of the document's synchronising circuit. Also checks that a pulse
// shorter than the low phase which does not straddle a falling edge is not
// captured (the first stage samples on the falling edge only). Clock is 16 MHz
// (62.5 ns). Timing figures follow the document; the test cases are this
// bench's own.
module tb_sync_ff;
  timeunit 1ns; timeprecision 1ps;
  logic       clk, rst_n = 1'b0;
  initial clk = 1'b0;
  logic       d1 = 1'b0;
  logic [3:0] d4 = 4'h0;
  logic       q1;
  logic [3:0] q4;
  int checks = 0, failures = 0;

  sync_ff #(.WIDTH(1), .RESET_VAL(1'b0)) u1 (.clk, .rst_n, .d(d1), .q(q1));
  sync_ff #(.WIDTH(4), .RESET_VAL(1'b1)) u4 (.clk, .rst_n, .d(d4), .q(q4));

  always #31.25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #200;
    check(q1 == 1'b0 && q4 == 4'hF, "reset values");
    @(posedge clk); #5 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(q1 == 1'b0 && q4 == 4'h0, "outputs follow input after reset");
    // change 10 ns before a falling edge: visible at the next rising edge
    @(negedge clk); #52.5 d1 = 1'b1; d4 = 4'hA;
    @(negedge clk); #1;
    check(q1 == 1'b0, "not visible at the falling edge");
    @(posedge clk); #1;
    check(q1 == 1'b1 && q4 == 4'hA, "visible half a period after the sampling edge");
    // change just after a falling edge: needs the next falling edge
    @(negedge clk); #2 d1 = 1'b0;
    @(posedge clk); #1;
    check(q1 == 1'b1, "change after falling edge not yet visible");
    @(posedge clk); #1;
    check(q1 == 1'b0, "change visible 1.5 periods later");
    // short pulse between falling edges is missed
    @(posedge clk); #5 d1 = 1'b1; #10 d1 = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(q1 == 1'b0, "pulse between falling edges not captured");
    // asynchronous reset in the middle of operation
    d4 = 4'h5; repeat (3) @(posedge clk); #7 rst_n = 1'b0; #1;
    check(q4 == 4'hF, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
