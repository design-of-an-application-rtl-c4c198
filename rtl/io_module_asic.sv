// VMEbus I/O module controller: the slave-interface chip of an industrial
// control system's I/O modules (discrete, analog and special-function).
//
// It makes an I/O module a 16-bit VMEbus slave with standard (24-bit) and
// short (16-bit) addressing while the module's own data bus is 8 bits wide:
// a word cycle is carried out as two byte transfers through the two VMEbus
// data transceivers, which this chip controls. It also runs the module's
// power-up initialisation over the interrupt acknowledge daisy chain (level
// six, vector 41h, then assignment of an 8-bit physical and a 5-bit logical
// address by short writes to 0120h), the output-disable broadcast (short
// address-only cycle to 0122h), the module reset command (short write to
// 0100h + 2*logical address), and a 524 ms watchdog that disables the
// module outputs when the controller stops accessing point data.
//
// Everything is clocked by the 16 MHz VMEbus SYSCLK, the only clock of the
// chip; asynchronous VMEbus inputs pass through two-stage synchronisers,
// except the address latch (clocked by the falling edge of AS*) and the
// daisy-chain pass-through (combinational). The six blocks are those of the
// original partitioning: address decode (adddec), external decode (extdec),
// memory (asic_memory), test/initialisation decode (tstinidec), watchdog and
// the controller state machine.
//
// Ports are the 42 inputs, 28 outputs and 8 bidirectional data pins of the
// chip; the bidirectional SD7..SD0 are split into sd_in, sd_out and a per-bit
// output enable sd_oe. Names ending in _n are active low (an asterisk in the
// VMEbus names). rdwr is RD/WR* (1 = read). Response timing: a byte read is
// acknowledged about 10 clocks after the data strobe (including the
// synchroniser delay), a word read 15, byte write 9 and word write 13.
//
// Follows the original: the block partitioning, pin set, address modifiers,
// offsets, initialisation sequence, watchdog length and state codes. This
// design's own choices: what each test enable does (the test enables
// TEN0..TEN7 decoded from AM2..AM0 and their routing to the blocks follow
// the original; the watchdog byte is on AM4..AM3, its direction on AM5), the
// priority of the internal drivers of the SD pins, and the omission of the AS* delay line (the address is
// latched on the AS* edge itself). The logical-address byte is stored whole
// but only its low five bits form the address, so bits 7..5 go unused; the
// per-byte write flags and the offset-0002 byte-ZERO strobe of the address
// decoder are not needed at this level and stay unconnected.
module io_module_asic
  import iomod_pkg::*;
#(
  parameter int unsigned WD_COUNT_WIDTH = WD_WIDTH,
  parameter int unsigned WD_TIMEOUT_CNT = WD_TIMEOUT
) (
  input  logic        sysclk,
  input  logic        sysreset_n,
  // VMEbus data transfer bus
  input  logic [23:1] a,
  input  logic [5:0]  am,
  input  logic        as_n,
  input  logic        ds0_n,
  input  logic        ds1_n,
  input  logic        lword_n,
  input  logic        iack_n,
  input  logic        rdwr,
  input  logic        iackin_n,
  output logic        iackout_n,
  output logic        dtack,
  output logic        berr,
  output logic        irq6,
  // module-side inputs
  input  logic        test,
  input  logic        simin,
  input  logic        busy_n,
  input  logic        berrfrpal_n,
  // module data bus
  input  logic [7:0]  sd_in,
  output logic [7:0]  sd_out,
  output logic [7:0]  sd_oe,
  // module-side outputs
  output logic [8:1]  la,
  output logic        ddir,
  output logic        ddir_n,
  output logic        leab0_n,
  output logic        leab1_n,
  output logic        en0_n,
  output logic        en1_n,
  output logic        alow,
  output logic        a0,
  output logic        modrst_n,
  output logic        outdis,
  output logic        write_n,
  output logic        epromen_n,
  output logic        addr3_n,
  output logic        addr1,
  output logic        read_n,
  output logic        vmeramen_n
);
  sm_out_t    smo;
  logic [5:0] q;
  logic       illegal;

  // adddec
  logic [3:1] la_iack;
  logic       iackl, irq6l, lwordl, vmeacc, short_la;
  logic       d_addr0, d_addr1, d_addr3, d_addre;
  logic       id_off, asic_off, ro_viol, writedis, wdclr, rstsm;
  logic       access;
  // extdec
  logic       dsenable, singdoub, a0_i, rdwr_s, berr_i, vmeramen;
  logic       en0, en1, leab0, leab1, epromen;
  // memory
  logic [7:0] mem_sdo, phys, logical;
  logic       mem_sdo_en, wrbd;
  // tstinidec
  logic       respond, tst_sdo_en, sm_tload, wd_tload, wd_tread;
  logic       mem_tload, mem_tread, mem_tsel;
  logic [7:0] tst_sdo;
  // watchdog
  logic       wdfl, wd_sdo7, wd_sdo7_en, wd_sdo_en;
  logic [7:0] wd_sdo;

  state_machine u_sm (
    .clk(sysclk), .sysreset_n(sysreset_n),
    .dsenable(dsenable), .respond(respond), .vmeacc(vmeacc), .berr(berr_i),
    .vmeramen(vmeramen), .rdwr(rdwr_s), .singdoub(singdoub), .wrbd(wrbd),
    .rstsm(rstsm), .writedis(writedis),
    .tload(sm_tload), .tdata(sd_in[5:0]),
    .out(smo), .q(q), .illegal(illegal)
  );

  adddec u_adddec (
    .clk(sysclk), .modrst(smo.modrst),
    .as_n(as_n), .a(a), .am(am), .lword_n(lword_n), .iack_n(iack_n),
    .irq6(smo.irq6), .a0(a0_i), .rdwr(rdwr_s), .singdoub(singdoub),
    .datadr(smo.datadr), .wdtrig(smo.wdtrig), .addrlat(smo.addrlat),
    .phys_mem(phys), .log_mem(logical[4:0]), .simin(simin), .wdfl(wdfl),
    .la(la), .la_iack(la_iack), .iackl(iackl), .irq6l(irq6l),
    .lwordl(lwordl), .alow(alow), .vmeacc(vmeacc), .short_la(short_la),
    .addr0(d_addr0), .addr1(d_addr1), .addr2(), .addr3(d_addr3),
    .addre(d_addre), .id_off(id_off), .asic_off(asic_off), .ro_viol(ro_viol),
    .writedis(writedis), .wdclr(wdclr), .rstsm(rstsm), .init_done(),
    .access(access), .outdis(outdis)
  );

  extdec u_extdec (
    .clk(sysclk), .modrst(smo.modrst),
    .ds0_n(ds0_n), .ds1_n(ds1_n), .rdwr_in(rdwr), .busy_n(busy_n),
    .berrfrpal_n(berrfrpal_n),
    .lwordl(lwordl), .asic_off(asic_off), .ro_viol(ro_viol), .id_off(id_off),
    .vec_cycle(respond && iackl),
    .smtrig(smo.smtrig), .a0sm(smo.a0sm), .busreq(smo.busreq),
    .datadr(smo.datadr), .datalat(smo.datalat),
    .dsenable(dsenable), .singdoub(singdoub), .a0(a0_i), .rdwr(rdwr_s),
    .berr(berr_i), .vmeramen(vmeramen), .en0(en0), .en1(en1),
    .leab0(leab0), .leab1(leab1), .ddir(ddir), .epromen(epromen)
  );

  asic_memory u_memory (
    .clk(sysclk), .modrst(smo.modrst), .respond(respond), .short_la(short_la),
    .write(smo.write), .read(smo.read), .vecen(smo.vecen), .a0(a0_i),
    .addr0(d_addr0), .addre(d_addre),
    .tst_load(mem_tload), .tst_read(mem_tread), .tst_sel(mem_tsel), .sdi(sd_in),
    .sdo(mem_sdo), .sdo_en(mem_sdo_en), .phys(phys), .logical(logical),
    .wrb0(), .wrb1(), .wrbd(wrbd)
  );

  tstinidec u_tstinidec (
    .clk(sysclk), .modrst(smo.modrst), .as_n(as_n), .iackin_n(iackin_n),
    .ds0_n(ds0_n), .ds1_n(ds1_n), .la_iack(la_iack), .iackl(iackl),
    .irq6l(irq6l), .addrlat(smo.addrlat), .test(test), .tsel(am[2:0]), .tdir(am[5]),
    .q(q), .illegal(illegal),
    .respond(respond), .iackout_n(iackout_n), .sdo(tst_sdo),
    .sdo_en(tst_sdo_en), .sm_tload(sm_tload), .wd_tload(wd_tload),
    .wd_tread(wd_tread), .mem_tload(mem_tload), .mem_tread(mem_tread),
    .mem_tsel(mem_tsel)
  );

  watchdog #(.WIDTH(WD_COUNT_WIDTH), .TIMEOUT(WD_TIMEOUT_CNT)) u_watchdog (
    .clk(sysclk), .modrst(smo.modrst), .wdtrig(smo.wdtrig), .wdclr(wdclr),
    .access(access), .status_rd(d_addr3 && smo.read),
    .test(test), .tload(wd_tload), .tread(wd_tread), .tsel(am[4:3]),
    .sdi(sd_in), .wdfl(wdfl), .sdo7(wd_sdo7), .sdo7_en(wd_sdo7_en),
    .sdo(wd_sdo), .sdo_en(wd_sdo_en)
  );

  // Internal data bus onto the SD pins.
  always_comb begin
    sd_out = '0;
    sd_oe  = '0;
    if (mem_sdo_en) begin
      sd_out = mem_sdo; sd_oe = '1;
    end else if (tst_sdo_en) begin
      sd_out = tst_sdo; sd_oe = '1;
    end else if (wd_sdo_en) begin
      sd_out = wd_sdo;  sd_oe = '1;
    end else if (wd_sdo7_en) begin
      sd_out[7] = wd_sdo7; sd_oe[7] = 1'b1;
    end
  end

  // Pin polarities.
  assign dtack      = smo.dtack;
  assign berr       = berr_i;
  assign irq6       = smo.irq6;
  assign ddir_n     = !ddir;
  assign leab0_n    = !leab0;
  assign leab1_n    = !leab1;
  assign en0_n      = !en0;
  assign en1_n      = !en1;
  assign a0         = a0_i;
  assign modrst_n   = !smo.modrst;
  assign write_n    = !smo.write;
  assign read_n     = !smo.read;
  assign epromen_n  = !epromen;
  assign addr3_n    = !(d_addr3 && rdwr_s);
  assign addr1      = d_addr1 && smo.read;
  assign vmeramen_n = !vmeramen;

endmodule
