// Self-checking testbench for watchdog.
//
// The counter keeps its full 24-bit width but the timeout is shortened to 200
// clocks so the run is short (the full 2**23-clock timeout is exercised by the
// top-level bench). Checks: the timer stays stopped until the first access;
// WDFL rises exactly TIMEOUT+2 clocks after the hold is released (one clock for
// the CLRDOG register, TIMEOUT counts, one clock for the flag register); a
// pet (wdtrig) restarts the count so no timeout occurs while the controller
// keeps petting; WDFL holds until wdclr and is also cleared by modrst; status
// bit 7 is driven only during a status read; the test-mode byte load and read
// work for bytes 0..2 and byte 3 reads as zero; in test mode CLRDOG does not
// clear the counter. Timing figures follow the document's watchdog; the test
// sequence is this bench's own.
module tb_watchdog;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned TO = 200;

  logic       clk, modrst, wdtrig, wdclr, access, status_rd;
  logic       test, tload, tread;
  logic [1:0] tsel;
  logic [7:0] sdi, sdo;
  logic       wdfl, sdo7, sdo7_en, sdo_en;
  int checks = 0, failures = 0;

  watchdog #(.WIDTH(24), .TIMEOUT(TO)) dut (.*);

  initial clk = 1'b0;
  always #31.25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Count the clocks until wdfl rises (gives up after lim).
  task automatic clocks_to_fail(input int lim, output int n);
    n = 0;
    while (!wdfl && n < lim) begin tick(); n++; end
  endtask

  int n;
  initial begin
    {modrst, wdtrig, wdclr, access, status_rd, test, tload, tread} = '0;
    tsel = 0; sdi = 0;
    modrst = 1'b1; tick(3); modrst = 1'b0;
    check(!wdfl, "WDFL low after reset");
    tick(3 * TO);
    check(!wdfl, "timer stopped before the first access");

    // release the hold at a clock edge and measure
    @(negedge clk); access = 1'b1;
    clocks_to_fail(3 * TO, n);
    check(n == TO + 2, $sformatf("timeout after %0d clocks (expect %0d)", n, TO + 2));
    tick(TO * 2);
    check(wdfl, "WDFL holds");
    check(!sdo7_en, "status bit not driven outside a status read");
    status_rd = 1'b1; #1;
    check(sdo7_en && sdo7, "status bit 7 shows WDFL");
    status_rd = 1'b0;

    // clear by wdclr, keep petting: no timeout
    @(negedge clk); wdclr = 1'b1; @(negedge clk); wdclr = 1'b0;
    check(!wdfl, "wdclr clears WDFL");
    for (int i = 0; i < 10; i++) begin
      repeat (TO - 20) @(negedge clk);
      wdtrig = 1'b1; @(negedge clk); wdtrig = 1'b0;
    end
    check(!wdfl, "regular pets prevent a timeout");
    clocks_to_fail(3 * TO, n);
    check(n == TO + 2, $sformatf("timeout after last pet %0d clocks (expect %0d)", n, TO + 2));
    @(negedge clk); modrst = 1'b1; @(negedge clk); modrst = 1'b0;
    check(!wdfl, "modrst clears WDFL");

    // test mode: load and read each byte
    @(negedge clk); access = 1'b0; test = 1'b1;
    for (int b = 0; b < 3; b++) begin
      tsel = 2'(b); sdi = 8'h11 * 8'(b + 1); tload = 1'b1;
      @(negedge clk); tload = 1'b0;
    end
    // the counter runs on in test mode even with the hold active
    tread = 1'b1;
    tsel = 2'd2; #1 check(sdo_en && sdo == 8'h33, $sformatf("byte 2 read back %h", sdo));
    tsel = 2'd1; #1 check(sdo == 8'h22, $sformatf("byte 1 read back %h", sdo));
    tsel = 2'd0; #1 check(sdo == 8'h11, $sformatf("byte 0 read back %h", sdo));
    tick(3);
    check(sdo == 8'h14, $sformatf("byte 0 counts on in test mode: %h", sdo));
    tsel = 2'd3; #1 check(sdo == 8'h00, "byte 3 reads zero");
    tsel = 2'd3; sdi = 8'hFF; tload = 1'b1; @(negedge clk); tload = 1'b0;
    tsel = 2'd2; #1 check(sdo == 8'h33, "load of byte 3 changes nothing");
    tread = 1'b0; #1 check(!sdo_en, "no test read drive without tread");
    // load just below the timeout and leave test mode with the hold released
    access = 1'b1;
    tsel = 2'd2; sdi = 8'h00; tload = 1'b1; @(negedge clk);
    tsel = 2'd1; @(negedge clk);
    tsel = 2'd0; sdi = 8'(TO - 10); @(negedge clk); tload = 1'b0;
    test = 1'b0;
    clocks_to_fail(100, n);
    check(wdfl && n < 15, $sformatf("loaded count times out early (%0d clocks)", n));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
