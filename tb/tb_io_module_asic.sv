// End-to-end test of the I/O module controller at its default parameters.
//
// The bench plays the VMEbus master (controller) and the rest of a 16-input,
// 16-output discrete I/O module board: the two latching VMEbus data
// transceivers, the identification logic (ID vector A5h, module type 01h,
// 16 inputs, 16 outputs), the input buffers, the output latches with
// readback, the status buffer and the point-enable logic that reports
// offsets the board does not have (BERRFRPAL*). The board model flags any
// clock in which two devices drive the 8-bit module bus at once.
//
// Sequence: power-up reset; an interrupt acknowledge at another level (must
// pass down the daisy chain); the level-six acknowledge (vector 41h, byte ONE
// only); assignment of physical address 5Ah and logical address 07h by two
// byte writes to short address 0120h; then byte and word reads and writes of
// input, output, identification, status and FFFE offsets; bus errors
// (32-bit request, absent offset, write to read-only offsets); wait for the
// data bus while a microcontroller holds BUSY*; address pipelining and a
// read-modify-write; ignored cycles (extended AM, other physical address,
// address-only); the broadcast output disable and its clear; a full 524 ms
// watchdog timeout (2**23 clocks) with status bit 7 and OUTDIS, the SIMIN
// bypass; the module-reset command and re-initialisation with a single word
// write; test-mode watchdog, address-register and state-variable access with
// illegal-state recovery. Each mechanism is counted and must occur at least once.
module tb_io_module_asic;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------- the chip
  logic        sysclk = 1'b0, sysreset_n = 1'b0;
  logic [23:1] a = '0;
  logic [5:0]  am = '0;
  logic        as_n = 1'b1, ds0_n = 1'b1, ds1_n = 1'b1, lword_n = 1'b1;
  logic        iack_n = 1'b1, rdwr = 1'b1, iackin_n = 1'b1;
  logic        test = 1'b0, simin = 1'b0, busy_n = 1'b1, berrfrpal_n;
  logic [7:0]  sd_in, sd_out, sd_oe;
  logic        iackout_n, dtack, berr, irq6;
  logic [8:1]  la;
  logic        ddir, ddir_n, leab0_n, leab1_n, en0_n, en1_n, alow, a0;
  logic        modrst_n, outdis, write_n, epromen_n, addr3_n, addr1, read_n;
  logic        vmeramen_n;

  io_module_asic dut (.*);

  always #31.25 sysclk = !sysclk;   // 16 MHz SYSCLK

  int cyc = 0;
  always @(posedge sysclk) cyc++;

  // ----------------------------------------------------- the board model
  localparam logic [7:0] ID_VEC = 8'hA5, MOD_TYPE = 8'h01;
  logic [15:0] in_pts  = 16'h3C96;        // discrete input points
  logic [15:0] out_pts = 16'hFFFF;        // discrete output latches
  logic [7:0]  status_lo = 7'h15;         // board status bits 6..0
  logic [7:0]  tr [2];                    // transceiver latches
  logic [15:0] master_d;                  // master write data
  logic        master_drv = 1'b0;
  logic [15:0] vme_d;                     // VMEbus data as seen by master
  logic        cur_rd;                    // direction of the master's cycle
  logic        cur_std;                   // standard-mode cycle to the board

  // Byte offset on the module bus.
  logic [8:0] boff;
  assign boff = {la, a0};

  logic       pal_drv, in_drv, out_drv, st_drv, tr_drv;
  logic [7:0] pal_d, in_d, out_d, st_d, tr_d, md;

  always_comb begin
    pal_drv = !epromen_n && !read_n;
    unique case (addr1 ? 9'h001 : boff)
      9'h001:  pal_d = ID_VEC;
      9'h002:  pal_d = MOD_TYPE;
      9'h004:  pal_d = 8'h01;   // input point type
      9'h005:  pal_d = 8'd16;
      9'h006:  pal_d = 8'h02;   // output point type
      9'h007:  pal_d = 8'd16;
      default: pal_d = 8'h00;
    endcase
    in_drv  = alow && cur_std && !read_n && (boff == 9'h010 || boff == 9'h011);
    in_d    = (boff == 9'h010) ? in_pts[15:8] : in_pts[7:0];
    out_drv = alow && cur_std && !read_n && (boff == 9'h018 || boff == 9'h019);
    out_d   = (boff == 9'h018) ? out_pts[15:8] : out_pts[7:0];
    st_drv  = !addr3_n && !read_n;
    st_d    = {1'b0, status_lo[6:0]};
    tr_drv  = !ddir && (!en0_n || !en1_n);
    tr_d    = !en0_n ? master_d[15:8] : master_d[7:0];
    md = '0;
    for (int i = 0; i < 8; i++) begin
      if (sd_oe[i]) md[i] = sd_out[i];
      else if (tr_drv) md[i] = tr_d[i];
      else if (pal_drv) md[i] = pal_d[i];
      else if (in_drv) md[i] = in_d[i];
      else if (out_drv) md[i] = out_d[i];
      else if (st_drv && i < 7) md[i] = st_d[i];
    end
  end
  assign sd_in = md;

  int contention = 0;
  always @(negedge sysclk) begin
    automatic int n7 = int'(sd_oe[7]) + int'(tr_drv) + int'(pal_drv) + int'(in_drv) + int'(out_drv);  // the status buffer drives D6..D0 only
    automatic int n0 = int'(sd_oe[0]) + int'(tr_drv) + int'(pal_drv) + int'(in_drv) + int'(out_drv) + int'(st_drv);
    if (!en0_n && !en1_n && !ddir) contention++;
    if (n7 > 1 || n0 > 1) contention++;
    // transceiver latches (latch enable sampled mid-cycle)
    if (!leab0_n) tr[0] <= md;
    if (!leab1_n) tr[1] <= md;
    // output latches capture while WRITE* is active
    if (!write_n && alow && cur_std && boff == 9'h018) out_pts[15:8] <= md;
    if (!write_n && alow && cur_std && boff == 9'h019) out_pts[7:0]  <= md;
  end

  // Point-enable logic: offsets the board does not have.
  always_comb begin
    berrfrpal_n = 1'b1;
    if (cur_std && !dut.u_adddec.asic_off && alow && !epromen_n == 1'b0) begin
      if (boff == 9'h010 || boff == 9'h011) berrfrpal_n = !cur_rd ? 1'b0 : 1'b1;
      else if (boff == 9'h018 || boff == 9'h019) berrfrpal_n = 1'b1;
      else if (boff >= 9'h004 && boff <= 9'h00B) berrfrpal_n = 1'b1;
      else berrfrpal_n = 1'b0;
    end else if (cur_std && !alow) berrfrpal_n = 1'b0;
  end

  assign vme_d = master_drv ? master_d :
                 {(!en0_n && ddir) ? tr[0] : 8'h00, (!en1_n && ddir) ? tr[1] : 8'h00};

  // --------------------------------------------------- mechanism counters
  int n_iack_resp = 0, n_iack_pass = 0, n_addr_assign = 0, n_byte_rd = 0;
  int n_word_rd = 0, n_byte_wr = 0, n_word_wr = 0, n_berr = 0, n_arb_wait = 0;
  int n_pipeline = 0, n_rmw = 0, n_ignored = 0, n_bcast = 0, n_wd_timeout = 0;
  int n_wd_clear = 0, n_simin = 0, n_modreset = 0, n_test = 0, n_illegal = 0;

  // ------------------------------------------------------- master tasks
  typedef struct {
    logic [15:0] rdata;
    bit          ack;
    bit          err;
    int          clocks;   // SYSCLK edges from data strobe to acknowledge
  } result_t;

  // Address phase only (AS* falls, strobes not yet).
  task automatic addr_phase(input logic [5:0] amv, input logic [23:1] addr,
                            input bit is_iack, input bit lw);
    a = addr; am = amv; iack_n = !is_iack; lword_n = !lw;
    #15 as_n = 1'b0;
  endtask

  // Data phase on an already asserted AS*.
  task automatic data_phase(input bit rd, input bit [1:0] ds, input logic [15:0] wd,
                            output result_t r);
    int c0, t;
    rdwr = rd;
    cur_rd = rd;
    if (!rd) begin master_d = wd; master_drv = 1'b1; end
    #15;
    ds1_n = !ds[1]; ds0_n = !ds[0];
    c0 = cyc;
    t = 0;
    while (!dtack && !berr && t < 4000) begin #5; t++; end
    r.ack = dtack; r.err = berr;
    r.clocks = cyc - c0;
    #20 r.rdata = vme_d;
  endtask

  task automatic end_cycle();
    int t = 0;
    as_n = 1'b1; ds0_n = 1'b1; ds1_n = 1'b1;
    while ((dtack || berr) && t < 1000) begin #5; t++; end
    master_drv = 1'b0;
    #40 rdwr = 1'b1; iack_n = 1'b1; lword_n = 1'b1;
  endtask

  task automatic vme(input logic [5:0] amv, input logic [23:1] addr, input bit rd,
                     input bit [1:0] ds, input logic [15:0] wd, output result_t r,
                     input bit lw = 1'b0);
    cur_std = (amv == 6'h39 || amv == 6'h3D);
    addr_phase(amv, addr, 1'b0, lw);
    data_phase(rd, ds, wd, r);
    end_cycle();
  endtask

  // Wait for a cycle nobody acknowledges (bus timeout).
  task automatic expect_no_response(input logic [5:0] amv, input logic [23:1] addr,
                                    input bit rd, string what);
    result_t r;
    vme(amv, addr, rd, 2'b11, 16'h1234, r);
    check(!r.ack && !r.err, what);
    if (!r.ack && !r.err) n_ignored++;
  endtask

  localparam logic [7:0] PHYS = 8'h5A;
  localparam logic [4:0] LOGA = 5'h07;

  function automatic logic [23:1] std_addr(input logic [15:0] off);
    return {PHYS, off[15:1]};
  endfunction
  function automatic logic [23:1] short_addr(input logic [15:0] addr16);
    return {8'h00, addr16[15:1]};
  endfunction

  // Interrupt acknowledge cycle at a level; returns the vector or a timeout.
  task automatic iack_cycle(input logic [2:0] level, input bit chain_in,
                            output result_t r, output bit passed);
    cur_std = 1'b0;
    addr_phase(6'h00, {20'h0, level}, 1'b1, 1'b0);
    rdwr = 1'b1; cur_rd = 1'b1;
    #45 if (chain_in) iackin_n = 1'b0;
    #10 ds0_n = 1'b0;                      // 8-bit vector on D7..D0
    begin
      int t = 0, c0 = cyc;
      while (!dtack && !berr && t < 600) begin #5; t++; end
      r.ack = dtack; r.err = berr; r.clocks = cyc - c0;
      #20 r.rdata = vme_d;
    end
    passed = !iackout_n;
    as_n = 1'b1; ds0_n = 1'b1; iackin_n = 1'b1;
    #10 check(iackout_n, "IACKOUT* released with AS*");
    begin automatic int t = 0; while (dtack && t < 1000) begin #5; t++; end end
    #40 iack_n = 1'b1;
  endtask

  // ---------------------------------------------------------- watchdog
  initial begin
    #1500ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------- sequence
  result_t r;
  bit      passed;
  int      t0;

  initial begin
    #500 sysreset_n = 1'b1;
    repeat (4) @(posedge sysclk);
    #5;
    check(!modrst_n || irq6, "reset state");
    repeat (4) @(posedge sysclk);
    check(irq6, "IRQ6 requested after reset");
    check(modrst_n, "MODRST* released");
    check(!outdis, "outputs enabled after reset");

    // IACK at level 3: must pass down the chain.
    iack_cycle(3'd3, 1'b1, r, passed);
    check(passed && !r.ack, "level-3 IACK passed on");
    if (passed) n_iack_pass++;
    check(irq6, "still requesting");

    // Level-6 IACK, chain not yet reaching us: no response.
    iack_cycle(3'd6, 1'b0, r, passed);
    check(!r.ack && !passed, "no response without IACKIN*");

    // Level-6 IACK with IACKIN*: respond with vector 41h on D7..D0.
    iack_cycle(3'd6, 1'b1, r, passed);
    check(r.ack && !passed, "level-6 IACK answered, not passed");
    check(r.rdata[7:0] == 8'h41, $sformatf("vector 41h (got %h)", r.rdata[7:0]));
    if (r.ack && r.rdata[7:0] == 8'h41) n_iack_resp++;
    repeat (2) @(posedge sysclk);
    check(!irq6, "IRQ6 released after acknowledge");

    // During initialisation only short 0120h is answered.
    expect_no_response(6'h39, std_addr(16'h0000), 1'b1, "standard cycle ignored before init");

    // Read 0120h: physical address (not yet written) and ID vector.
    vme(6'h2D, short_addr(16'h0120), 1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata[7:0] == ID_VEC, "short read of 0120h returns ID vector");

    // Address assignment: logical byte first, then physical byte.
    vme(6'h2D, short_addr(16'h0120), 1'b0, 2'b01, {8'h00, 3'b0, LOGA}, r);
    check(r.ack && !r.err, "logical address byte write");
    check(dut.u_adddec.init_done == 1'b0, "init waits for second byte");
    vme(6'h2D, short_addr(16'h0120), 1'b0, 2'b10, {PHYS, 8'h00}, r);
    check(r.ack && !r.err, "physical address byte write");
    repeat (2) @(posedge sysclk);
    check(dut.u_adddec.init_done, "initialisation complete");
    if (dut.u_adddec.init_done) n_addr_assign++;

    // FFFE: physical and logical address.
    vme(6'h39, std_addr(16'hFFFE), 1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata == {PHYS, 3'b0, LOGA}, $sformatf("FFFE read (got %h)", r.rdata));
    if (r.ack) n_word_rd++;
    // Offset 0000 word: physical address + ID vector.
    vme(6'h3D, std_addr(16'h0000), 1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata == {PHYS, ID_VEC}, $sformatf("offset 0000 read (got %h)", r.rdata));
    check(r.clocks >= 13 && r.clocks <= 17, $sformatf("word read latency %0d clocks", r.clocks));
    // Identification bytes.
    vme(6'h39, std_addr(16'h0004), 1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata == 16'h0110, "input point type / count");
    vme(6'h39, std_addr(16'h0002), 1'b1, 2'b10, 16'h0, r);
    check(r.ack && r.rdata[15:8] == MOD_TYPE, "module type byte");
    if (r.ack) n_byte_rd++;
    // Status register byte ONE: bit 7 = watchdog fail (clear).
    vme(6'h39, std_addr(16'h0002), 1'b1, 2'b01, 16'h0, r);
    check(r.ack && r.rdata[7:0] == {1'b0, status_lo[6:0]}, "status byte");
    check(r.clocks >= 8 && r.clocks <= 12, $sformatf("byte read latency %0d clocks", r.clocks));
    // Input points.
    vme(6'h39, std_addr(16'h0010), 1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata == in_pts, $sformatf("input word (got %h)", r.rdata));
    vme(6'h39, std_addr(16'h0010), 1'b1, 2'b01, 16'h0, r);
    check(r.ack && r.rdata[7:0] == in_pts[7:0], "input byte ONE");
    // Output points: word write then readback.
    vme(6'h39, std_addr(16'h0018), 1'b0, 2'b11, 16'hA55A, r);
    check(r.ack && !r.err && out_pts == 16'hA55A, $sformatf("output word write (%h)", out_pts));
    check(r.clocks >= 11 && r.clocks <= 15, $sformatf("word write latency %0d clocks", r.clocks));
    if (r.ack && out_pts == 16'hA55A) n_word_wr++;
    vme(6'h39, std_addr(16'h0018), 1'b0, 2'b10, 16'h3300, r);
    check(r.ack && out_pts == 16'h335A, "output byte ZERO write");
    check(r.clocks >= 7 && r.clocks <= 11, $sformatf("byte write latency %0d clocks", r.clocks));
    vme(6'h39, std_addr(16'h0018), 1'b0, 2'b01, 16'h00C3, r);
    check(r.ack && out_pts == 16'h33C3, "output byte ONE write");
    if (r.ack && out_pts == 16'h33C3) n_byte_wr++;
    vme(6'h39, std_addr(16'h0018), 1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata == 16'h33C3, "output readback");

    // Bus errors.
    vme(6'h39, std_addr(16'h0010), 1'b1, 2'b11, 16'h0, r, 1'b1);
    check(r.err && !r.ack, "32-bit request gives BERR");
    if (r.err) n_berr++;
    vme(6'h39, std_addr(16'h0014), 1'b1, 2'b11, 16'h0, r);
    check(r.err && !r.ack, "absent input points give BERR");
    vme(6'h39, std_addr(16'h0010), 1'b0, 2'b11, 16'h0, r);
    check(r.err && !r.ack, "write to inputs gives BERR");
    vme(6'h39, std_addr(16'h0000), 1'b0, 2'b11, 16'h0, r);
    check(r.err && !r.ack, "write to offset 0000 gives BERR");
    vme(6'h39, std_addr(16'hFFFE), 1'b0, 2'b11, 16'h0, r);
    check(r.err && !r.ack, "write to FFFE gives BERR");
    vme(6'h39, std_addr(16'h0002), 1'b0, 2'b10, 16'h0, r);
    check(r.err && !r.ack, "byte ZERO write to 0002 gives BERR");
    check(contention == 0, "no module bus contention so far");

    // Ignored cycles.
    expect_no_response(6'h09, std_addr(16'h0010), 1'b1, "extended AM ignored");
    expect_no_response(6'h39, {8'h5B, 15'h0008}, 1'b1, "other physical address ignored");
    expect_no_response(6'h2D, short_addr(16'h0120), 1'b1, "0120h ignored after init");

    // Arbitration: microcontroller holds the bus.
    busy_n = 1'b0;
    cur_std = 1'b1;
    addr_phase(6'h39, std_addr(16'h0010), 1'b0, 1'b0);
    fork
      data_phase(1'b1, 2'b11, 16'h0, r);
      begin
        repeat (30) @(posedge sysclk);
        check(!dtack && !vmeramen_n == 1'b0, "no grant while BUSY*");
        if (!dtack && vmeramen_n) n_arb_wait++;
        busy_n = 1'b1;
      end
    join
    check(r.ack && r.rdata == in_pts && r.clocks > 30, "read completes after BUSY* release");
    end_cycle();
    check(!vmeramen_n == 1'b0, "VMERAMEN* released after the cycle");

    // Address pipelining: next address and AS* while the previous data
    // strobes are still held.
    cur_std = 1'b1;
    addr_phase(6'h39, std_addr(16'h0010), 1'b0, 1'b0);
    data_phase(1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata == in_pts, "pipelined first read");
    as_n = 1'b1;
    #35 a = std_addr(16'h0018);
    #15 as_n = 1'b0;                     // new address while DS* held
    #40 ds0_n = 1'b1; ds1_n = 1'b1;
    begin automatic int t = 0; while (dtack && t < 1000) begin #5; t++; end end
    #40 data_phase(1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata == 16'h33C3, "pipelined second read");
    if (r.ack && r.rdata == 16'h33C3) n_pipeline++;
    end_cycle();

    // Read-modify-write: AS* held across a read and a write.
    addr_phase(6'h39, std_addr(16'h0018), 1'b0, 1'b0);
    data_phase(1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata == 16'h33C3, "RMW read");
    ds0_n = 1'b1; ds1_n = 1'b1;
    begin automatic int t = 0; while (dtack && t < 1000) begin #5; t++; end end
    #40 data_phase(1'b0, 2'b11, r.rdata ^ 16'h00FF, r);
    check(r.ack && out_pts == 16'h333C, "RMW write");
    if (r.ack && out_pts == 16'h333C) n_rmw++;
    end_cycle();

    // Broadcast output disable (address-only short cycle to 0122h).
    cur_std = 1'b0;
    addr_phase(6'h2D, short_addr(16'h0122), 1'b0, 1'b0);
    #40 as_n = 1'b1;
    #200;
    check(outdis, "OUTDIS after broadcast");
    if (outdis) n_bcast++;
    simin = 1'b1; #1;
    check(!outdis, "SIMIN bypasses output disable");
    if (!outdis) n_simin++;
    simin = 1'b0;
    vme(6'h39, std_addr(16'h0002), 1'b0, 2'b01, 16'h0, r);
    check(r.ack && !r.err, "watchdog clear write acknowledged");
    check(!outdis, "OUTDIS cleared by write to 0002");
    if (r.ack && !outdis) n_wd_clear++;
    check(out_pts == 16'h333C, "write to 0002 did not reach the board");

    // Watchdog: no access for 2**23 clocks.
    vme(6'h39, std_addr(16'h0010), 1'b1, 2'b11, 16'h0, r);   // pet
    t0 = cyc;
    wait (outdis);
    begin
      automatic int dt = cyc - t0;
      check(dt >= 8388608 && dt <= 8388608 + 12, $sformatf("timeout after %0d clocks", dt));
    end
    n_wd_timeout++;
    vme(6'h39, std_addr(16'h0002), 1'b1, 2'b01, 16'h0, r);
    check(r.ack && r.rdata[7] == 1'b1, "status bit 7 shows watchdog fail");
    check(outdis, "pet by read does not clear a timeout");
    vme(6'h39, std_addr(16'h0002), 1'b0, 2'b11, 16'h0, r);
    check(r.ack && !outdis, "word write to 0002 clears the timeout");

    // Module reset command: short write to 0100h + 2*7 = 010Eh.
    vme(6'h2D, short_addr(16'h010E), 1'b1, 2'b01, 16'h0, r);
    check(r.ack && r.rdata[7:0] == ID_VEC, "short read of 0100h+2LA");
    vme(6'h2D, short_addr(16'h010E), 1'b0, 2'b11, 16'h0, r);
    check(r.ack, "module reset command acknowledged");
    repeat (4) @(posedge sysclk);
    check(irq6 && !dut.u_adddec.init_done, "module re-initialising");
    if (irq6) n_modreset++;
    iack_cycle(3'd6, 1'b1, r, passed);
    check(r.ack && r.rdata[7:0] == 8'h41, "second initialisation vector");
    vme(6'h2D, short_addr(16'h0120), 1'b0, 2'b11, {8'h66, 8'h03}, r);
    check(r.ack && !r.err, "word write of both addresses");
    vme(6'h39, {8'h66, 15'h7FFF}, 1'b1, 2'b11, 16'h0, r);
    check(r.ack && r.rdata == 16'h6603, "new addresses in use");

    // Test mode: load a watchdog byte and read it back; state access.
    test = 1'b1; am = 6'b00_1101; master_drv = 1'b0;
    force sd_in = 8'h5C;
    @(posedge sysclk); #5;
    release sd_in;
    am = 6'b10_1101; #1;
    check(sd_oe == 8'hFF && sd_out == 8'h5C, "test: watchdog byte 1 readback");
    am = 6'b00_0011; #1;
    check(sd_oe == 8'hFF && sd_out[5:0] == 6'b100100 && !sd_out[7], "test: state 10 observed");
    if (sd_out[5:0] == 6'b100100) n_test++;
    am = 6'b00_0100; #1;                 // read the physical address register
    check(sd_oe == 8'hFF && sd_out == 8'h66, $sformatf("test: physical address %h read", sd_out));
    am = 6'b00_0001;                     // load the physical address register
    force sd_in = 8'hC6;
    @(posedge sysclk); #5;
    release sd_in;
    am = 6'b00_0100; #1;
    check(sd_out == 8'hC6, "test: physical address register loaded");
    am = 6'b00_0110; #1;
    check(sd_out == 8'h03, "test: logical address register read");
    if (sd_out == 8'hC6) n_test++;
    am = 6'b00_0111;
    force sd_in = 8'h3F;                 // not a state code
    @(posedge sysclk); #5;
    release sd_in;
    am = 6'b00_0011;
    @(posedge sysclk); #5;
    check(sd_out[7], "test: illegal state flagged");
    if (sd_out[7]) n_illegal++;
    test = 1'b0; am = '0;
    sysreset_n = 1'b0; #200 sysreset_n = 1'b1;
    repeat (6) @(posedge sysclk);
    check(irq6, "recovered to initialisation");

    // Mechanism coverage.
    check(contention == 0, $sformatf("module bus contention count %0d", contention));
    check(n_iack_resp > 0,  "mechanism: IACK response");
    check(n_iack_pass > 0,  "mechanism: daisy-chain pass");
    check(n_addr_assign > 0,"mechanism: address assignment");
    check(n_byte_rd > 0,    "mechanism: byte read");
    check(n_word_rd > 0,    "mechanism: word read");
    check(n_byte_wr > 0,    "mechanism: byte write");
    check(n_word_wr > 0,    "mechanism: word write");
    check(n_berr > 0,       "mechanism: bus error");
    check(n_arb_wait > 0,   "mechanism: arbitration wait");
    check(n_pipeline > 0,   "mechanism: address pipelining");
    check(n_rmw > 0,        "mechanism: read-modify-write");
    check(n_ignored > 0,    "mechanism: ignored cycle");
    check(n_bcast > 0,      "mechanism: broadcast output disable");
    check(n_wd_timeout > 0, "mechanism: watchdog timeout");
    check(n_wd_clear > 0,   "mechanism: watchdog clear");
    check(n_simin > 0,      "mechanism: SIMIN bypass");
    check(n_modreset > 0,   "mechanism: module reset command");
    check(n_test > 0,       "mechanism: test mode");
    check(n_illegal > 0,    "mechanism: illegal state detection");
    $display("mechanisms: iack_resp=%0d pass=%0d assign=%0d brd=%0d wrd=%0d bwr=%0d wwr=%0d berr=%0d arb=%0d pipe=%0d rmw=%0d ign=%0d bcast=%0d wdto=%0d wdclr=%0d simin=%0d modrst=%0d test=%0d illegal=%0d",
             n_iack_resp, n_iack_pass, n_addr_assign, n_byte_rd, n_word_rd, n_byte_wr, n_word_wr,
             n_berr, n_arb_wait, n_pipeline, n_rmw, n_ignored, n_bcast, n_wd_timeout, n_wd_clear,
             n_simin, n_modreset, n_test, n_illegal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
