// Self-checking testbench for adddec.
//
// Runs VMEbus address phases (AS* falling with address, AM code, IACK* and
// LWORD* set up 10 ns before) against the decoder, with the controller-side
// inputs driven at the falling clock edge. Checks: before initialisation only
// the short-mode cycle to 0120h (logical address 10000b) is decoded and
// standard-mode cycles are ignored; ADDRLAT loads the physical and logical
// addresses, after which standard cycles (AM 39h and 3Dh) with A23..A16 equal
// to the physical address are decoded, other AM codes, other boards and
// acknowledge cycles are not, and the short address moves to 0100h+2*LA; the
// offset strobes ADDR0..3/ADDRE, ALOW, the ID-offset and read-only-violation
// flags; WDCLR on a write of byte ONE of 0002; the address-only broadcast to
// 0122h sets OUTDIS, which WDCLR clears and SIMIN bypasses, and WDFL also
// sets OUTDIS; the module-reset command sets RSTSM; WDTRIG starts the watchdog
// (ACCESS); MODRST restores the reset state. Address map and AM codes follow
// the document; the offsets counted as read-only are this design's reading.
module tb_adddec;
  timeunit 1ns; timeprecision 1ps;
  logic        clk, modrst, as_n, lword_n, iack_n, irq6, a0, rdwr, singdoub, datadr, wdtrig, addrlat, simin, wdfl;
  logic [23:1] a;
  logic [5:0]  am;
  logic [7:0]  phys_mem;
  logic [4:0]  log_mem;
  logic [8:1]  la;
  logic [3:1]  la_iack;
  logic        iackl, irq6l, lwordl, alow, vmeacc, short_la, addr0, addr1, addr2, addr3, addre;
  logic        id_off, asic_off, ro_viol, writedis, wdclr, rstsm, init_done, access, outdis;
  int checks = 0, failures = 0;

  adddec dut (.*);

  initial clk = 1'b0;
  always #31.25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic addr_phase(input logic [23:0] addr, input logic [5:0] m, input bit iack = 0);
    as_n = 1'b1; #40;
    a = addr[23:1]; am = m; iack_n = !iack; lword_n = 1'b1;
    #10 as_n = 1'b0;
    repeat (2) @(posedge clk); #1;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1; @(negedge clk) s = 1'b0; #1;
  endtask

  initial begin
    as_n = 1'b1; a = '0; am = '0; lword_n = 1'b1; iack_n = 1'b1;
    {irq6, a0, datadr, wdtrig, addrlat, simin, wdfl} = '0;
    rdwr = 1'b1; singdoub = 1'b1; phys_mem = 8'hC3; log_mem = 5'd7;
    modrst = 1'b1; repeat (3) @(posedge clk); @(negedge clk) modrst = 1'b0;

    addr_phase(24'hC30000, 6'h39);
    check(!vmeacc && !addr0, "standard cycle ignored before initialisation");
    addr_phase(24'h000120, 6'h2D);
    check(vmeacc && short_la && addr0, "short cycle to 0120h decoded");
    addr_phase(24'h000120, 6'h2D, 1);
    check(!vmeacc && !short_la && iackl, "acknowledge cycle not decoded");
    addr_phase(24'h000006, 6'h2D, 1);
    check(la_iack == 3'd3, "interrupt level latched");
    pulse(addrlat);
    check(init_done, "initialisation done");

    addr_phase(24'hC30000, 6'h39);
    check(vmeacc && addr0 && !addr1 && alow && asic_off && !id_off, "offset 0000 byte ZERO");
    a0 = 1'b1; #1 check(addr1 && id_off && !addr0, "offset 0001 from external logic");
    addr_phase(24'hC30002, 6'h3D);
    a0 = 1'b0; #1 check(vmeacc && addr2 && id_off, "offset 0002 byte ZERO");
    a0 = 1'b1; #1 check(addr3 && !id_off, "offset 0003 status");
    rdwr = 1'b0; #1 check(!ro_viol && writedis, "write of 0003 allowed, no module strobe");
    a0 = 1'b0; #1 check(ro_viol, "single write of 0002 byte ZERO is a violation");
    singdoub = 1'b0; #1 check(!ro_viol, "word write of 0002 allowed");
    pulse(wdtrig);
    check(access, "watchdog started by the first transfer");
    a0 = 1'b1; wdtrig = 1'b1; #1 check(wdclr, "WDCLR on write of 0002/0003");
    @(negedge clk) wdtrig = 1'b0; singdoub = 1'b1; rdwr = 1'b1; a0 = 1'b0;
    addr_phase(24'hC30008, 6'h39);
    check(vmeacc && id_off && alow && !asic_off, "ID offset 0008");
    rdwr = 1'b0; #1 check(ro_viol, "write to ID offset");
    rdwr = 1'b1;
    addr_phase(24'hC3FFFE, 6'h39);
    check(vmeacc && addre && !alow && asic_off, "offset FFFE");
    rdwr = 1'b0; #1 check(ro_viol, "write to FFFE");
    rdwr = 1'b1;
    addr_phase(24'hC30100, 6'h39);
    check(vmeacc && alow && la == 8'h80 && !asic_off && !id_off, "offset 0100 for external decode");
    rdwr = 1'b0; #1 check(!ro_viol && !writedis, "write to 0100 allowed");
    rdwr = 1'b1;
    addr_phase(24'hC20000, 6'h39);
    check(!vmeacc, "other physical address ignored");
    addr_phase(24'hC30000, 6'h09);
    check(!vmeacc, "other address modifier ignored");
    addr_phase(24'hC30000, 6'h39, 1);
    check(!vmeacc, "acknowledge ignored in standard decode");
    addr_phase(24'h000120, 6'h2D);
    check(!short_la, "0120h no longer decoded");
    addr_phase(24'h00010E, 6'h2D);
    check(vmeacc && short_la, "short address 0100h+2*LA");
    rdwr = 1'b0; #1 check(writedis, "reset command produces no module strobe");
    pulse(datadr);
    check(rstsm, "module reset command");
    rdwr = 1'b1;

    // broadcast output disable
    check(!outdis, "outputs enabled");
    addr_phase(24'h000122, 6'h2D);
    as_n = 1'b1; repeat (3) @(posedge clk); #1;
    check(outdis, "broadcast disables outputs");
    simin = 1'b1; #1 check(!outdis, "SIMIN bypasses OUTDIS");
    simin = 1'b0;
    addr_phase(24'hC30002, 6'h39);
    rdwr = 1'b0; a0 = 1'b1;
    pulse(wdtrig);
    check(!outdis, "watchdog clear re-enables outputs");
    wdfl = 1'b1; #1 check(outdis, "WDFL disables outputs");
    wdfl = 1'b0; rdwr = 1'b1; a0 = 1'b0;

    lword_n = 1'b0; #10 as_n = 1'b1; #40 as_n = 1'b0; #1;
    check(lwordl, "LWORD* latched");
    irq6 = 1'b1; as_n = 1'b1; #40 as_n = 1'b0; #1;
    check(irq6l, "request latched at AS*");

    pulse(modrst);
    check(!init_done && !rstsm && !access && !outdis, "module reset");
    addr_phase(24'h000120, 6'h2D);
    check(short_la, "logical address back to 10000b");
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
