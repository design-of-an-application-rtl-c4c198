// Self-checking testbench for state_machine.
//
// Drives the controller inputs at the falling clock edge and compares the
// state variables after every rising edge against the state codes of the
// document's state diagram (typed in here as plain 6-bit values, so a wrong
// code in the package is caught). Paths covered: reset and the interrupt
// request, an acknowledge for another module, the own acknowledge with the
// vector, an ignored cycle, a bus-error cycle, single and word reads and
// writes, an arbitration wait, the address-assignment write ending with
// ADDRLAT, a write with WRITE suppressed, the module-reset command returning
// to state 0, and a test-mode load of an unused code which must be flagged as
// illegal and recovered to state 0. Selected outputs (MODRST, IRQ6, VECEN,
// DTACK, SMTRIG, BUSREQ, READ, WRITE, WDTRIG, ADDRLAT, A0SM, DATADR, DATALAT) are checked in the
// states where the diagram asserts them. Codes and transitions follow the
// document; the test sequence is this bench's own.
module tb_state_machine
  import iomod_pkg::*;
;
  timeunit 1ns; timeprecision 1ps;
  logic       clk, sysreset_n, dsenable, respond, vmeacc, berr, vmeramen, rdwr, singdoub;
  logic       wrbd, rstsm, writedis, tload, illegal;
  logic [5:0] tdata, q;
  sm_out_t    out;
  int checks = 0, failures = 0;

  state_machine dut (.*);

  initial clk = 1'b0;
  always #31.25 clk = ~clk;

  // state codes of the diagram, indexed by state number
  localparam logic [5:0] C [37] = '{
    6'b000000, 6'b000010, 6'b000110, 6'b000111, 6'b010010, 6'b010011, 6'b010101,
    6'b010110, 6'b010100, 6'b000100, 6'b100100, 6'b100101, 6'b110101, 6'b101100,
    6'b111100, 6'b011100, 6'b001100, 6'b001110, 6'b001101, 6'b001111, 6'b101110,
    6'b100110, 6'b011101, 6'b011011, 6'b001011, 6'b001000, 6'b000011, 6'b111110,
    6'b110011, 6'b000001, 6'b100001, 6'b100000, 6'b010001, 6'b001010, 6'b001001,
    6'b101001, 6'b110001 };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Advance one clock and check the state number.
  task automatic step(input int s);
    @(posedge clk); #1;
    check(q == C[s], $sformatf("expected state %0d (%b), got %b", s, C[s], q));
  endtask

  task automatic steps(input int s[]);
    foreach (s[i]) step(s[i]);
  endtask

  task automatic at_neg(); @(negedge clk); endtask

  // One decoded cycle up to state 14 with the bus granted at once.
  task automatic to_s14();
    at_neg(); dsenable = 1'b1; vmeacc = 1'b1; berr = 1'b0; vmeramen = 1'b1;
    steps('{11, 12, 13, 14});
  endtask

  initial begin
    {dsenable, respond, vmeacc, berr, vmeramen, rdwr, singdoub, wrbd, rstsm, writedis, tload} = '0;
    tdata = '0;
    sysreset_n = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(q == C[0] && out.modrst, "reset: state 0 with MODRST");
    at_neg(); sysreset_n = 1'b1;
    @(posedge clk); #1 check(q == C[0], "reset release is synchronised");
    begin
      automatic int n = 0;
      while (q != C[1] && n < 4) begin @(posedge clk); #1; n++; end
      check(n <= 2, $sformatf("state 1 within two clocks of the release (%0d)", n));
    end
    steps('{1});
    check(out.irq6 && !out.modrst, "IRQ6 requested");

    // acknowledge for another module, then own acknowledge
    at_neg(); dsenable = 1'b1;
    steps('{2, 3, 4, 1});
    respond = 1'b1;
    steps('{2, 3, 4, 5});
    check(out.vecen && out.a0sm, "vector enabled on byte ONE");
    steps('{6});
    check(out.datalat, "DATALAT for the vector");
    steps('{7, 8, 8});
    check(out.dtack, "DTACK for the vector");
    at_neg(); dsenable = 1'b0;
    steps('{9, 10, 10});

    // ignored cycle and bus error
    at_neg(); dsenable = 1'b1; vmeacc = 1'b0;
    steps('{11, 10, 11});
    at_neg(); vmeacc = 1'b1; berr = 1'b1;
    steps('{12, 13});
    check(out.smtrig, "SMTRIG in state 13");
    steps('{13});
    at_neg(); dsenable = 1'b0;
    steps('{10});
    check(!out.dtack, "no DTACK after bus error");

    // single read with arbitration wait
    rdwr = 1'b1; singdoub = 1'b1;
    at_neg(); dsenable = 1'b1; berr = 1'b0; vmeramen = 1'b0;
    steps('{11, 12, 13, 14, 14});
    check(out.busreq, "BUSREQ while waiting");
    at_neg(); vmeramen = 1'b1;
    steps('{15});
    check(out.datadr, "DATADR at the start of the read");
    steps('{16});
    check(out.read && !out.a0sm, "READ of byte ZERO/single byte");
    steps('{17, 18, 19, 20, 20});
    check(out.dtack, "DTACK after read");
    at_neg(); dsenable = 1'b0;
    steps('{21});
    check(out.wdtrig, "WDTRIG at end of cycle");
    steps('{10});

    // word read
    singdoub = 1'b0;
    to_s14();
    steps('{15, 16, 17, 18, 22, 23});
    check(out.read && out.a0sm, "READ of byte ONE");
    steps('{24, 25, 26, 19, 20});
    at_neg(); dsenable = 1'b0;
    steps('{21, 10});

    // single write
    rdwr = 1'b0; singdoub = 1'b1;
    to_s14();
    steps('{27, 28});
    check(out.write && !out.a0sm, "WRITE strobe");
    steps('{29, 30, 31, 31});
    check(out.dtack, "DTACK after write");
    at_neg(); dsenable = 1'b0;
    steps('{10});

    // word write
    singdoub = 1'b0;
    to_s14();
    steps('{27, 28, 29, 32, 33, 34});
    check(out.write && out.a0sm, "WRITE of byte ONE");
    steps('{35, 30});
    check(out.a0sm, "A0SM held in state 30 after a word write");
    steps('{31});
    at_neg(); dsenable = 1'b0;
    steps('{10});

    // address assignment during initialisation: ADDRLAT
    singdoub = 1'b1; respond = 1'b1; wrbd = 1'b1;
    to_s14();
    steps('{27, 28, 29, 30});
    check(!out.a0sm, "A0SM low in state 30 after a single write");
    steps('{36});
    check(out.addrlat, "ADDRLAT");
    steps('{31});
    at_neg(); dsenable = 1'b0; respond = 1'b0; wrbd = 1'b0;
    steps('{10});

    // suppressed write, then module-reset command
    writedis = 1'b1; rstsm = 1'b1;
    to_s14();
    steps('{27, 28});
    check(!out.write, "WRITE suppressed");
    steps('{29, 30, 31});
    at_neg(); dsenable = 1'b0; writedis = 1'b0;
    steps('{0});
    check(out.modrst, "module reset");
    rstsm = 1'b0;
    steps('{1});

    // illegal state
    check(!illegal, "no illegal state so far");
    at_neg(); tload = 1'b1; tdata = 6'b111111;
    @(posedge clk); #1 check(q == 6'b111111, "test load");
    at_neg(); tload = 1'b0;
    steps('{0});
    check(illegal, "illegal state flagged");
    steps('{1});
    check(illegal, "flag is sticky");
    at_neg(); tload = 1'b1; tdata = C[10];
    @(posedge clk); #1 check(q == C[10] && !illegal, "load of a legal state clears the flag");
    at_neg(); tload = 1'b0;
    steps('{10});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
