// Self-checking testbench for asic_memory.
//
// Drives the controller strobes directly at the falling clock edge and checks
// the state after the rising edge. Checks: both registers clear on modrst;
// writes are accepted only while respond and short_la are both high (the
// initialisation window) and select the register by a0 (byte ZERO = physical
// address, byte ONE = logical address, this design's layout); wrb0/wrb1 mark
// each byte and wrbd needs both; the vector 41h is driven by vecen with
// priority; the test-mode load and read of each register work; reads of
// offset 0000 byte ZERO and of FFFE return the physical address, FFFF the
// logical address; nothing is driven otherwise. The register
// meanings follow the document; the byte layout is this design's choice.
module tb_asic_memory;
  timeunit 1ns; timeprecision 1ps;
  logic       clk, modrst, respond, short_la, write, read, vecen, a0, addr0, addre;
  logic       tst_load, tst_read, tst_sel;
  logic [7:0] sdi, sdo, phys, logical;
  logic       sdo_en, wrb0, wrb1, wrbd;
  int checks = 0, failures = 0;

  asic_memory dut (.*);

  initial clk = 1'b0;
  always #31.25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(input bit r, input bit s, input bit byte1, input logic [7:0] v);
    @(negedge clk);
    respond = r; short_la = s; a0 = byte1; sdi = v; write = 1'b1;
    @(negedge clk);
    write = 1'b0; respond = 1'b0; short_la = 1'b0;
  endtask

  initial begin
    {respond, short_la, write, read, vecen, a0, addr0, addre} = '0;
    {tst_load, tst_read, tst_sel} = '0;
    sdi = '0;
    modrst = 1'b1; repeat (2) @(posedge clk); #1;
    check(phys == 0 && logical == 0 && !wrbd, "cleared by modrst");
    @(negedge clk); modrst = 1'b0;
    wr(1'b0, 1'b1, 1'b0, 8'h5A);
    check(phys == 0 && !wrb0, "no write outside initialisation");
    wr(1'b1, 1'b0, 1'b0, 8'h5A);
    check(phys == 0 && !wrb0, "no write to another address");
    wr(1'b1, 1'b1, 1'b0, 8'h5A);
    check(phys == 8'h5A && wrb0 && !wrb1 && !wrbd, "byte ZERO writes physical address");
    wr(1'b1, 1'b1, 1'b1, 8'h13);
    check(logical == 8'h13 && wrb1 && wrbd && phys == 8'h5A, "byte ONE writes logical address");
    #1 check(!sdo_en, "nothing driven when idle");
    read = 1'b1; addr0 = 1'b1; #1;
    check(sdo_en && sdo == 8'h5A, "offset 0000 byte ZERO reads physical address");
    addr0 = 1'b0; addre = 1'b1; a0 = 1'b0; #1;
    check(sdo_en && sdo == 8'h5A, "FFFE reads physical address");
    a0 = 1'b1; #1;
    check(sdo_en && sdo == 8'h13, "FFFF reads logical address");
    vecen = 1'b1; #1;
    check(sdo_en && sdo == 8'h41, "vector 41h has priority");
    read = 1'b0; addre = 1'b0; #1;
    check(sdo_en && sdo == 8'h41, "vector alone");
    vecen = 1'b0; #1;
    check(!sdo_en, "released");
    @(negedge clk); modrst = 1'b1; @(negedge clk); modrst = 1'b0; #1;
    check(phys == 0 && logical == 0 && !wrb0 && !wrb1, "module reset clears");
    // test-mode access
    @(negedge clk) tst_load = 1'b1; tst_sel = 1'b1; sdi = 8'hA5;
    @(negedge clk) tst_sel = 1'b0; sdi = 8'h3C;
    @(negedge clk) tst_load = 1'b0; #1;
    check(logical == 8'hA5 && phys == 8'h3C, "test load of both registers");
    tst_read = 1'b1; vecen = 1'b1; #1;
    check(sdo_en && sdo == 8'h3C, "test read of physical address has priority");
    tst_sel = 1'b1; #1 check(sdo == 8'hA5, "test read of logical address");
    tst_read = 1'b0; vecen = 1'b0;
    @(negedge clk); modrst = 1'b1; @(negedge clk); modrst = 1'b0; #1;
    check(phys == 0 && logical == 0, "module reset after test load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    $display("FAIL: watchdog expired");
    // test-mode access
    @(negedge clk) tst_load = 1'b1; tst_sel = 1'b1; sdi = 8'hA5;
    @(negedge clk) tst_sel = 1'b0; sdi = 8'h3C;
    @(negedge clk) tst_load = 1'b0; #1;
    check(logical == 8'hA5 && phys == 8'h3C, "test load of both registers");
    tst_read = 1'b1; vecen = 1'b1; #1;
    check(sdo_en && sdo == 8'h3C, "test read of physical address has priority");
    tst_sel = 1'b1; #1 check(sdo == 8'hA5, "test read of logical address");
    tst_read = 1'b0; vecen = 1'b0;
    @(negedge clk); modrst = 1'b1; @(negedge clk); modrst = 1'b0; #1;
    check(phys == 0 && logical == 0, "module reset after test load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
