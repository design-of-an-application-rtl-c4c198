// Self-checking testbench for tstinidec.
//
// Checks the interrupt-acknowledge daisy chain and the test decoder. While
// the module has IRQ6 latched and the acknowledge is for level 6 it must not
// pass IACKIN* on, and respond must rise (through the synchroniser, within
// two clocks) once IACKIN*, AS* and a data strobe are all low; respond clears
// at the next address latch. When the acknowledge is for another level, or the
// module has no request, IACKIN* is passed to IACKOUT* while AS* is low and
// respond stays low. In test mode each AM2..0 code (with AM5 as the watchdog
// direction) must select exactly its access: state read-out (with the illegal
// flag in bit 7), state load, watchdog byte load and read, and address-register
// load and read with the right register; without TEST nothing is selected.
// The daisy-chain rule and the enable numbering follow the document; what each
// enable does is this design's own choice.
module tb_tstinidec;
  timeunit 1ns; timeprecision 1ps;
  logic       clk, modrst, as_n, iackin_n, ds0_n, ds1_n, iackl, irq6l, addrlat, test, illegal;
  logic [3:1] la_iack;
  logic [2:0] tsel;
  logic [5:0] q;
  logic       respond, iackout_n, sdo_en, sm_tload, wd_tload, wd_tread, mem_tload, mem_tread, mem_tsel;
  logic       tdir;
  logic [7:0] sdo;
  int checks = 0, failures = 0;

  tstinidec dut (.*);

  initial clk = 1'b0;
  always #31.25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // One acknowledge cycle; returns whether IACKOUT* fell and respond rose.
  task automatic ack(input logic [3:1] lvl, input bit req, output bit passed, output bit claimed);
    passed = 0; claimed = 0;
    @(negedge clk);
    la_iack = lvl; iackl = 1'b1; irq6l = req; as_n = 1'b0;
    #20 ds0_n = 1'b0; ds1_n = 1'b0;
    #20 iackin_n = 1'b0;
    for (int i = 0; i < 4; i++) begin
      @(posedge clk); #1;
      if (!iackout_n) passed = 1;
      if (respond) claimed = 1;
    end
    {as_n, ds0_n, ds1_n, iackin_n} = 4'hF;
    #1 check(iackout_n, "IACKOUT* released with AS*");
  endtask

  bit p, c;
  initial begin
    {as_n, iackin_n, ds0_n, ds1_n} = 4'hF;
    {iackl, irq6l, addrlat, test, illegal} = '0;
    la_iack = 0; tsel = 0; q = 0; tdir = 0;
    modrst = 1'b1; repeat (2) @(posedge clk); #1;
    check(!respond && iackout_n, "idle after reset");
    @(negedge clk); modrst = 1'b0;

    ack(3'd6, 1'b1, p, c);
    check(!p && c, "level 6 with request: claimed, not passed");
    check(respond, "respond holds after the cycle");
    @(negedge clk); addrlat = 1'b1; @(negedge clk); addrlat = 1'b0; #1;
    check(!respond, "respond clears at the next address latch");
    ack(3'd5, 1'b1, p, c);
    check(p && !c, "other level passed on");
    ack(3'd6, 1'b0, p, c);
    check(p && !c, "no request: passed on");
    ack(3'd6, 1'b1, p, c);
    @(negedge clk); modrst = 1'b1; @(negedge clk); modrst = 1'b0; #1;
    check(!respond, "module reset clears respond");

    // test decoder
    q = 6'b101101; illegal = 1'b1;
    for (int t = 0; t < 2; t++) begin
      test = 1'(t);
      for (int k = 0; k < 16; k++) begin
        automatic bit on = (t == 1);
        automatic int code = k % 8;
        tsel = 3'(code); tdir = (k >= 8); #1;
        check(sdo_en    == (on && code == 3), $sformatf("state read select test=%0d code=%0d", t, k));
        check(sm_tload  == (on && code == 7), $sformatf("state load select test=%0d code=%0d", t, k));
        check(wd_tload  == (on && code == 5 && !tdir), $sformatf("watchdog load select test=%0d code=%0d", t, k));
        check(wd_tread  == (on && code == 5 &&  tdir), $sformatf("watchdog read select test=%0d code=%0d", t, k));
        check(mem_tload == (on && (code == 1 || code == 2)), $sformatf("memory load select test=%0d code=%0d", t, k));
        check(mem_tread == (on && (code == 4 || code == 6)), $sformatf("memory read select test=%0d code=%0d", t, k));
        if (mem_tload || mem_tread)
          check(mem_tsel == (code == 2 || code == 6), $sformatf("memory register select code=%0d", k));
      end
    end
    check(sdo == 8'b1010_1101, "state read-out format");
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
