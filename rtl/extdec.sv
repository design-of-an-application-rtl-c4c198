// External decode block of the VMEbus I/O module controller.
//
// Synchronises the data strobes DS0*, DS1*, RD/WR*, BUSY* and BERRFRPAL* to
// the system clock and derives from them:
//   * DSENABLE: at least one data strobe active;
//   * SINGDOUB: 1 for a single-byte cycle, 0 when both strobes are active
//     (a word);
//   * A0: the byte on the 8-bit module bus. In a byte cycle A0 follows DS1*
//     (DS1* active selects byte ZERO, A0 = 0); in a word cycle it follows the
//     controller's A0SM (byte ZERO in the first half, byte ONE in the second);
//   * BERR: set while the controller's SMTRIG is active if the cycle asks
//     for 32 bits (LWORD*), writes a read-only offset, or targets an offset
//     outside the chip that the external logic rejects (BERRFRPAL* low);
//     held until both data strobes are released;
//   * the VMEbus data transceiver controls: EN0*/EN1* from the controller's
//     DATADR, LEAB0*/LEAB1* from DATALAT, and DDIR/DDIR*. In reads both
//     bytes are driven for a word and one for a byte; in the initialisation
//     interrupt-acknowledge cycle only byte ONE. In writes only the byte
//     selected by A0 is driven onto the module bus, and an enable may rise
//     only in a clock after the other one has fallen (break before make).
//     The direction is captured while no enable is active and held while
//     either is;
//   * the module data bus arbitration with a microcontroller: while the
//     controller requests the bus (BUSREQ) and BUSY* is inactive, VMERAMEN*
//     goes low at a falling clock edge and stays low until BUSREQ is removed;
//   * EPROMEN*: read of an identification offset held in the external logic.
// All outputs here are active high; pin polarities are applied at the top.
module extdec (
  input  logic clk,
  input  logic modrst,
  // raw asynchronous inputs
  input  logic ds0_n,
  input  logic ds1_n,
  input  logic rdwr_in,      // RD/WR*, 1 = read
  input  logic busy_n,
  input  logic berrfrpal_n,
  // from address decode
  input  logic lwordl,
  input  logic asic_off,
  input  logic ro_viol,
  input  logic id_off,
  // initialisation interrupt-acknowledge cycle in progress (RESPOND during
  // a cycle with IACK* latched active)
  input  logic vec_cycle,
  // from the controller
  input  logic smtrig,
  input  logic a0sm,
  input  logic busreq,
  input  logic datadr,
  input  logic datalat,
  // outputs
  output logic dsenable,
  output logic singdoub,
  output logic a0,
  output logic rdwr,
  output logic berr,
  output logic vmeramen,
  output logic en0, en1,
  output logic leab0, leab1,
  output logic ddir,
  output logic epromen
);
  logic [1:0] ds_s;          // [1] = DS1 active, [0] = DS0 active
  logic       busy_s, berrpal_s;

  sync_ff #(.WIDTH(2), .RESET_VAL(1'b0)) u_ds_sync (
    .clk(clk), .rst_n(1'b1), .d({!ds1_n, !ds0_n}), .q(ds_s)
  );
  sync_ff #(.WIDTH(3), .RESET_VAL(1'b0)) u_misc_sync (
    .clk(clk), .rst_n(1'b1), .d({rdwr_in, !busy_n, !berrfrpal_n}),
    .q({rdwr, busy_s, berrpal_s})
  );

  assign dsenable = |ds_s;
  assign singdoub = !(&ds_s);
  assign a0       = singdoub ? !ds_s[1] : a0sm;

  // ------------------------------------------------------------- bus error
  logic berr_cond, berr_q;
  assign berr_cond = lwordl || ro_viol || (!asic_off && berrpal_s);

  always_ff @(posedge clk) begin
    if (modrst || !dsenable) berr_q <= 1'b0;
    else if (smtrig && berr_cond) berr_q <= 1'b1;
  end
  assign berr = berr_q || (smtrig && berr_cond);

  // ------------------------------------------------------ bus arbitration
  always_ff @(negedge clk) begin
    if (modrst || !busreq) vmeramen <= 1'b0;
    else if (!busy_s)      vmeramen <= 1'b1;
  end

  // ------------------------------------------------- transceiver controls
  logic dir_read, req0, req1, en0_w, en1_w;

  assign dir_read = rdwr || vec_cycle;

  always_comb begin
    if (dir_read) begin
      req0 = datadr && !vec_cycle && (!singdoub || !a0);
      req1 = datadr && (vec_cycle || !singdoub || a0);
    end else begin
      req0 = datadr && !a0;
      req1 = datadr &&  a0;
    end
  end

  // Write direction: registered with break-before-make interlock.
  always_ff @(posedge clk) begin
    if (modrst || dir_read) begin
      en0_w <= 1'b0;
      en1_w <= 1'b0;
    end else begin
      en0_w <= req0 && !en1_w;
      en1_w <= req1 && !en0_w;
    end
  end

  assign en0 = dir_read ? req0 : en0_w;
  assign en1 = dir_read ? req1 : en1_w;

  assign leab0 = datalat && dir_read && !a0;
  assign leab1 = datalat && dir_read &&  a0;

  always_ff @(posedge clk) begin
    if (modrst)            ddir <= 1'b0;
    else if (!(en0 || en1)) ddir <= dir_read;
  end

  assign epromen = id_off && rdwr;
endmodule
