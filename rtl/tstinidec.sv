// Test and initialisation decode block of the VMEbus I/O module controller.
//
// Interrupt acknowledge daisy chain. During an interrupt-acknowledge cycle
// (IACK* latched active at the falling edge of AS*) the module is selected
// when the level on A3..A1 is six and it was requesting an interrupt when AS*
// fell. A falling edge on IACKIN* then either
//   * passes the cycle on: IACKOUT* = IACKIN* while AS* is low, for a module
//     that is not selected (combinational, so IACKOUT* follows IACKIN* and is
//     released with AS* without a clock of delay), or
//   * claims it: IACKIN* low together with an active data strobe, passed
//     through a two-stage synchroniser, sets RESPOND at a rising clock edge.
// RESPOND stays set through the rest of initialisation and is cleared by the
// controller's ADDRLAT pulse (or a module reset).
//
// Test mode (test high): AM2..AM0 are decoded into eight test enables
// TEN0..TEN7, numbered as in the original, which route them to the state read-out
// buffer (TEN3), the state machine (TEN7), the watchdog (TEN5) and the memory
// block (TEN1, TEN2, TEN4, TEN6). What each enable does is this design's
// choice, as the original gives only the connections:
//   011  TEN3  drive {ILLEGAL, 0, state code} onto the data bus (code bit 5
//              is the original's Q0, its most significant state variable);
//   111  TEN7  load the state variables from the data bus;
//   101  TEN5  watchdog counter byte AM4..AM3: load from the data bus when
//              AM5 is 0, drive onto the data bus when AM5 is 1;
//   001  TEN1  load the physical-address register from the data bus;
//   010  TEN2  load the logical-address register;
//   100  TEN4  drive the physical-address register onto the data bus;
//   110  TEN6  drive the logical-address register.
// The memory access lets the registers be checked for reset and latching
// without VMEbus cycles. The read-out word sdo is the state code and ILLEGAL
// wired straight through, with bit 6 tied low; only its drive enable (sdo_en)
// is decoded here, as the buffer itself sits at the pins.
module tstinidec
  import iomod_pkg::*;
(
  input  logic       clk,
  input  logic       modrst,
  input  logic       as_n,
  input  logic       iackin_n,
  input  logic       ds0_n,
  input  logic       ds1_n,
  input  logic [3:1] la_iack,   // latched A3..A1
  input  logic       iackl,     // latched IACK* active
  input  logic       irq6l,     // interrupt request latched at AS*
  input  logic       addrlat,
  input  logic       test,
  input  logic [2:0] tsel,      // AM2..AM0
  input  logic       tdir,      // AM5: watchdog test direction, 1 = read
  input  logic [5:0] q,         // controller state variables
  input  logic       illegal,
  output logic       respond,
  output logic       iackout_n,
  output logic [7:0] sdo,
  output logic       sdo_en,
  output logic       sm_tload,
  output logic       wd_tload,
  output logic       wd_tread,
  output logic       mem_tload,
  output logic       mem_tread,
  output logic       mem_tsel
);
  logic sel, claim_raw, claim_s;

  assign sel       = iackl && irq6l && (la_iack == IRQ_LEVEL);
  assign iackout_n = iackin_n || as_n || sel;
  assign claim_raw = !iackin_n && !as_n && sel && (!ds0_n || !ds1_n);

  sync_ff #(.WIDTH(1), .RESET_VAL(1'b0)) u_claim_sync (
    .clk(clk), .rst_n(1'b1), .d(claim_raw), .q(claim_s)
  );

  always_ff @(posedge clk) begin
    if (modrst || addrlat) respond <= 1'b0;
    else if (claim_s)      respond <= 1'b1;
  end

  assign sdo      = {illegal, 1'b0, q};
  // Test enables TEN0..TEN7: a 3-to-8 decode of AM2..AM0 while TEST is high.
  // TEN0 has no use here, so only TEN1..TEN7 are built.
  logic [7:1] ten;
  always_comb
    for (int i = 1; i < 8; i++) ten[i] = test && (tsel == 3'(i));

  assign sdo_en    = ten[3];
  assign sm_tload  = ten[7];
  assign wd_tload  = ten[5] && !tdir;
  assign wd_tread  = ten[5] &&  tdir;
  assign mem_tload = ten[1] || ten[2];
  assign mem_tread = ten[4] || ten[6];
  assign mem_tsel  = ten[2] || ten[6];
endmodule
