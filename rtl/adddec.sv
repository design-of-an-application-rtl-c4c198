// Address decode block of the VMEbus I/O module controller.
//
// At the falling edge of AS* the block latches A23..A1, AM5..AM0, LWORD*,
// IACK* and the interrupt-request state, as the VMEbus master guarantees them
// stable 10 ns before that edge. From the latched values it decodes:
//   * the addressing mode: AM 39h or 3Dh = standard (24-bit), 2Dh = short;
//     any other code is ignored;
//   * a standard cycle to this module: A23..A16 equal to the physical address
//     assigned at initialisation (only after initialisation is complete);
//   * a short cycle to this module: A15..A1 equal to 0100h + 2*(logical
//     address). The five logical-address flip-flops reset to 10000b, so during
//     initialisation the module answers only short address 0120h;
//   * the broadcast short address 0122h (output-disable command), detected
//     from AS* alone so that address-only cycles work;
//   * the memory-map offsets handled inside the chip: ADDR0/ADDR1 (offset
//     0000, bytes ZERO/ONE), ADDR2/ADDR3 (offset 0002, bytes ZERO/ONE), ADDRE
//     (offset FFFE), the identification offsets read through the external
//     logic (EPROMEN), and ALOW (offset inside 0000..01FF).
// VMEACC, the valid-access indication to the controller, is the decode ANDed
// with AS* low and passed through a two-stage synchroniser.
//
// Synchronous side (rising SYSCLK): the initialisation-done flag (set by
// ADDRLAT), the logical and physical address copies used by the compare, the
// pending module-reset command (short write to 0100h+2*LA after
// initialisation), the output-disable command (cleared by a watchdog-clear
// write to offset 0002), the watchdog-clear pulse, the write-disable for
// writes that must not reach module devices, and the ACCESS flag that lets
// the watchdog start after the first successful access following
// initialisation. OUTDIS = (command or watchdog fail) unless SIMIN.
//
// Design choices not fixed by the original: the compare uses A23..A16 for the
// eight-bit physical address; byte ZERO of a word is the even byte (D15..D8);
// a write to offsets 0000, 0004..000E or FFFE, or a byte-ZERO-only write to
// 0002, is a read-only violation reported as a bus error.
module adddec
  import iomod_pkg::*;
(
  input  logic        clk,
  input  logic        modrst,
  // VMEbus, raw
  input  logic        as_n,
  input  logic [23:1] a,
  input  logic [5:0]  am,
  input  logic        lword_n,
  input  logic        iack_n,
  // from other blocks (synchronous)
  input  logic        irq6,        // interrupt request active
  input  logic        a0,          // active byte on the module bus
  input  logic        rdwr,        // synchronised RD/WR*, 1 = read
  input  logic        singdoub,    // 1 = single byte cycle
  input  logic        datadr,      // controller in a transfer
  input  logic        wdtrig,      // successful cycle completed
  input  logic        addrlat,     // end of initialisation
  input  logic [7:0]  phys_mem,    // physical address written at init
  input  logic [4:0]  log_mem,     // logical address written at init (bits 4..0)
  input  logic        simin,       // bypass output disabling
  input  logic        wdfl,        // watchdog fail
  // outputs
  output logic [8:1]  la,          // latched A8..A1
  output logic [3:1]  la_iack,     // latched A3..A1 (interrupt level)
  output logic        iackl,       // latched IACK* active
  output logic        irq6l,       // interrupt request latched at AS*
  output logic        lwordl,      // latched LWORD* active
  output logic        alow,
  output logic        vmeacc,      // synchronised valid access
  output logic        short_la,    // short cycle to 0100h+2*LA
  output logic        addr0, addr1, addr2, addr3, addre,
  output logic        id_off,      // identification offset (external logic)
  output logic        asic_off,    // offset validated inside the chip
  output logic        ro_viol,     // write to a read-only offset
  output logic        writedis,
  output logic        wdclr,
  output logic        rstsm,
  output logic        init_done,
  output logic        access,
  output logic        outdis
);

  // ---------------------------------------------------------------- latches
  logic [23:1] la_q;
  logic [5:0]  am_q;
  logic        lword_q, iack_q, irq6_q, bcast_q, tag_q;

  always_ff @(negedge as_n) begin
    la_q    <= a;
    am_q    <= am;
    lword_q <= !lword_n;
    iack_q  <= !iack_n;
    irq6_q  <= irq6;
    bcast_q <= (am == AM_SHORT) && iack_n && (a[15:1] == BCAST_OUTDIS);
    tag_q   <= !tag_q;        // toggles once per AS* cycle
  end

  assign la      = la_q[8:1];
  assign la_iack = la_q[3:1];
  assign iackl   = iack_q;
  assign irq6l   = irq6_q;
  assign lwordl  = lword_q;

  // ----------------------------------------------------------------- decode
  logic [4:0]  log_addr;
  logic [7:0]  phys_addr;
  logic        std_mode, short_mode, std_hit;
  logic [14:0] off;

  assign std_mode   = (am_q == AM_STD_A) || (am_q == AM_STD_B);
  assign short_mode = (am_q == AM_SHORT);
  assign off        = la_q[15:1];
  assign alow       = (la_q[15:9] == '0);

  assign std_hit  = !iack_q && std_mode && init_done && (la_q[23:16] == phys_addr);
  assign short_la = !iack_q && short_mode && (off == {7'b0000000, 3'b100, log_addr});

  logic off0, off2, offe;
  assign off0 = (std_hit && off == 15'd0) || short_la;
  assign off2 = std_hit && off == 15'd1;
  assign offe = std_hit && off == '1;

  assign addr0 = off0 && !a0;
  assign addr1 = off0 &&  a0;
  assign addr2 = off2 && !a0;
  assign addr3 = off2 &&  a0;
  assign addre = offe;

  // Identification bytes supplied by the external logic: 0001, 0002 byte
  // ZERO, 0004..000B.
  assign id_off = addr1 || addr2 ||
                  (std_hit && off >= 15'd2 && off <= 15'd5);

  assign asic_off = off0 || off2 || offe;

  assign ro_viol = !rdwr && ((std_hit && (off == 15'd0 || (off >= 15'd2 && off <= 15'd7)))
                             || offe
                             || (off2 && singdoub && !a0));

  logic vmeacc_raw;
  assign vmeacc_raw = !as_n && (std_hit || short_la);

  sync_ff #(.WIDTH(1), .RESET_VAL(1'b0)) u_acc_sync (
    .clk(clk), .rst_n(1'b1), .d(vmeacc_raw), .q(vmeacc)
  );

  // Writes that must not produce a module write strobe.
  assign writedis = !rdwr && (off2 || (short_la && init_done));

  // ------------------------------------------------------- synchronous part
  logic       tag_s, tag_d, new_cycle, outdis_cmd;

  sync_ff #(.WIDTH(1), .RESET_VAL(1'b0)) u_tag_sync (
    .clk(clk), .rst_n(1'b1), .d(tag_q), .q(tag_s)
  );
  always_ff @(posedge clk) tag_d <= tag_s;
  assign new_cycle = tag_s ^ tag_d;

  assign wdclr = wdtrig && !rdwr && off2 && (!singdoub || a0);

  always_ff @(posedge clk) begin
    if (modrst) begin
      init_done  <= 1'b0;
      log_addr   <= LOGADDR_RESET;
      phys_addr  <= '0;
      rstsm      <= 1'b0;
      outdis_cmd <= 1'b0;
      access     <= 1'b0;
    end else begin
      if (addrlat) begin
        init_done <= 1'b1;
        log_addr  <= log_mem;
        phys_addr <= phys_mem;
      end
      if (datadr && !rdwr && short_la && init_done)
        rstsm <= 1'b1;
      if (wdclr)
        outdis_cmd <= 1'b0;
      else if (new_cycle && bcast_q && init_done)
        outdis_cmd <= 1'b1;
      if (wdtrig && init_done)
        access <= 1'b1;
    end
  end

  assign outdis = !simin && (outdis_cmd || wdfl);

endmodule
