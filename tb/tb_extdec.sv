// Self-checking testbench for extdec.
//
// Drives the raw VMEbus strobes asynchronously and the controller outputs at
// the falling clock edge. Checks: data strobes are synchronised (visible
// within two clocks) and decoded into DSENABLE, SINGDOUB and A0 (DS1* alone =
// byte ZERO, A0=0; DS0* alone = byte ONE, A0=1; both = word, A0 from A0SM);
// BERR is raised at SMTRIG for LWORD*, a read-only violation or a PAL error
// (the PAL error is masked for ASIC-decoded offsets) and holds until the data
// strobes are released; VMERAMEN waits for BUSY* to go high, changes on the
// falling clock edge and drops with BUSREQ; the transceiver enables follow
// the byte lane, in a write both enables are never on together and the
// direction only changes while both are off (checked continuously); LEAB
// follows DATALAT in reads; the vector cycle uses byte ONE in the read
// direction; EPROMEN is a read of the ID offsets. The rules follow the
// document; the byte-lane assignment is this design's reading of it.
module tb_extdec;
  timeunit 1ns; timeprecision 1ps;
  logic clk, modrst, ds0_n, ds1_n, rdwr_in, busy_n, berrfrpal_n;
  logic lwordl, asic_off, ro_viol, id_off, vec_cycle, smtrig, a0sm, busreq, datadr, datalat;
  logic dsenable, singdoub, a0, rdwr, berr, vmeramen, en0, en1, leab0, leab1, ddir, epromen;
  int checks = 0, failures = 0;
  int overlap, dir_glitch;

  extdec dut (.*);

  initial clk = 1'b0;
  always #31.25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // continuous checks on the module-bus transceivers
  logic ddir_prev;
  always @(en0 or en1 or ddir) begin
    if (!ddir && en0 && en1) overlap++;
    if (ddir !== ddir_prev && (en0 || en1)) dir_glitch++;
    ddir_prev = ddir;
  end

  task automatic settle(); repeat (2) @(posedge clk); #1; endtask

  initial begin
    overlap = 0; dir_glitch = 0;
    {ds0_n, ds1_n, busy_n, berrfrpal_n} = 4'hF;
    rdwr_in = 1'b1;
    {lwordl, asic_off, ro_viol, id_off, vec_cycle, smtrig, a0sm, busreq, datadr, datalat} = '0;
    modrst = 1'b1; settle(); @(negedge clk); modrst = 1'b0;

    // strobe decoding
    #7 ds1_n = 1'b0; settle();
    check(dsenable && singdoub && !a0, "DS1* alone: byte ZERO");
    ds1_n = 1'b1; #3 ds0_n = 1'b0; settle();
    check(dsenable && singdoub && a0, "DS0* alone: byte ONE");
    ds1_n = 1'b0; settle();
    check(dsenable && !singdoub && a0 == a0sm, "word: A0 from A0SM");
    a0sm = 1'b1; #1 check(a0, "A0 follows A0SM in word cycles");
    {ds0_n, ds1_n} = 2'b11; settle();
    check(!dsenable, "strobes released");

    // bus errors
    @(negedge clk) ds0_n = 1'b0; lwordl = 1'b1; settle();
    check(!berr, "no BERR before SMTRIG");
    @(negedge clk) smtrig = 1'b1; #1 check(berr, "LWORD* error at SMTRIG");
    @(negedge clk) smtrig = 1'b0; lwordl = 1'b0; #1 check(berr, "BERR holds");
    ds0_n = 1'b1; settle(); settle(); check(!berr, "BERR released with DS*");
    for (int k = 0; k < 4; k++) begin
      @(negedge clk) ds0_n = 1'b0;
      ro_viol = (k == 0); berrfrpal_n = !(k >= 2); asic_off = (k == 3);
      settle();
      @(negedge clk) smtrig = 1'b1; #1;
      check(berr == (k % 2 == 0), $sformatf("error condition %0d", k));
      @(negedge clk) smtrig = 1'b0; ds0_n = 1'b1; ro_viol = 1'b0; berrfrpal_n = 1'b1; asic_off = 1'b0;
      settle();
    end

    // arbitration
    busy_n = 1'b0; settle();
    @(negedge clk) busreq = 1'b1; settle(); settle();
    check(!vmeramen, "VMERAMEN waits for BUSY*");
    @(negedge clk); #1 busy_n = 1'b1;
    @(negedge clk); #1;
    check(!vmeramen, "BUSY* seen after synchronisation only");
    @(negedge clk); #1 check(vmeramen, "VMERAMEN granted");
    @(posedge clk); #1 check(vmeramen, "changes on the falling edge only");
    busy_n = 1'b0; settle(); check(vmeramen, "grant held while requested");
    @(negedge clk) busreq = 1'b0; #1 check(!vmeramen, "released with BUSREQ");
    busy_n = 1'b1;

    // read transfers, byte ONE then word
    rdwr_in = 1'b1; ds0_n = 1'b0; settle();
    @(negedge clk) datadr = 1'b1; #1;
    check(!en0 && en1 && ddir, "read byte ONE enables EN1");
    datalat = 1'b1; #1 check(leab1 && !leab0, "latch byte ONE");
    @(negedge clk) datadr = 1'b0; datalat = 1'b0; ds1_n = 1'b0; a0sm = 1'b0; settle();
    @(negedge clk) datadr = 1'b1; #1 check(en0 && en1, "word read enables both");
    @(negedge clk) datadr = 1'b0; {ds0_n, ds1_n} = 2'b11; settle();

    // write transfers: byte ZERO, then word (two bytes)
    rdwr_in = 1'b0; ds1_n = 1'b0; settle(); settle();
    check(!ddir, "write direction");
    @(negedge clk) datadr = 1'b1; settle();
    check(en0 && !en1, "write byte ZERO enables EN0");
    @(negedge clk) datadr = 1'b0; settle();
    ds0_n = 1'b0; settle();
    @(negedge clk) datadr = 1'b1; a0sm = 1'b0; settle();
    check(en0 && !en1, "word write: byte ZERO first");
    @(negedge clk) a0sm = 1'b1; settle();
    check(!en0 && en1, "word write: byte ONE second");
    @(negedge clk) datadr = 1'b0; {ds0_n, ds1_n} = 2'b11; settle();

    // vector cycle (IACK read) uses byte ONE, direction to the VMEbus
    rdwr_in = 1'b1; ds0_n = 1'b0; settle();
    @(negedge clk) vec_cycle = 1'b1; datadr = 1'b1; #1;
    check(!en0 && en1, "vector on byte ONE");
    @(negedge clk) datadr = 1'b0; vec_cycle = 1'b0; ds0_n = 1'b1; settle();

    id_off = 1'b1; #1 check(epromen, "EPROMEN on ID read");
    rdwr_in = 1'b0; settle(); check(!epromen, "no EPROMEN on write");
    id_off = 1'b0;
    check(!rdwr, "RD/WR* synchronised");

    check(overlap == 0, $sformatf("enables never both on in write direction (%0d)", overlap));
    check(dir_glitch == 0, $sformatf("direction changes only with enables off (%0d)", dir_glitch));
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
