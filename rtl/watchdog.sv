// Watchdog timer of the I/O module.
//
// A 24-bit counter of system clock edges (the original is six cascaded 4-bit
// parallel-load counters). The counter is held at zero while CLRDOG is
// active; CLRDOG is the OR of a watchdog pet from the controller after each
// successful transfer (wdtrig), a watchdog-clear write to offset 0002 (wdclr),
// the module reset (modrst), and the hold that keeps the timer stopped until
// the first valid access after initialisation (access low). CLRDOG is
// released through a register so the counter starts at the rising edge after
// the release. One clock after the counter reaches TIMEOUT (2**23 = 8,388,608
// edges, 524 ms at 16 MHz) the fail flag WDFL is set; it holds, whatever the
// counter does, until wdclr (or a module reset) clears it. WDFL disables the
// module outputs at the top level and is status bit 7.
//
// Status read: while status_rd is high (read of offset 0003) the block drives
// WDFL onto data bit 7 (sdo7/sdo7_en); the enable is status_rd itself.
//
// Test mode (test high): tload loads byte tsel (0..2) of the counter from sdi
// on a clock edge; tread drives byte tsel of the counter onto sdo with sdo_en.
// The byte select and strobes come from address-modifier pins at the top
// level; that pin assignment is this design's choice.
module watchdog
  import iomod_pkg::*;
#(
  parameter int unsigned WIDTH   = WD_WIDTH,
  parameter int unsigned TIMEOUT = WD_TIMEOUT
) (
  input  logic       clk,
  input  logic       modrst,
  input  logic       wdtrig,
  input  logic       wdclr,
  input  logic       access,
  input  logic       status_rd,
  input  logic       test,
  input  logic       tload,
  input  logic       tread,
  input  logic [1:0] tsel,
  input  logic [7:0] sdi,
  output logic       wdfl,
  output logic       sdo7,
  output logic       sdo7_en,
  output logic [7:0] sdo,
  output logic       sdo_en
);
  localparam int unsigned NBYTES = (WIDTH + 7) / 8;
  localparam int unsigned XW     = NBYTES * 8;

  logic             clrdog, clrdog_q;
  logic [WIDTH-1:0] count;
  logic [XW-1:0]    count_ext, count_ld;
  logic [7:0]       tbyte;

  // Counter widened to whole bytes, and the value after a test-mode load.
  always_comb begin
    count_ext = XW'(count);
    count_ld  = count_ext;
    if (32'(tsel) < NBYTES) count_ld[tsel*8 +: 8] = sdi;
    tbyte = (32'(tsel) < NBYTES) ? count_ext[tsel*8 +: 8] : 8'h00;
  end

  assign clrdog = wdtrig | wdclr | modrst | !access;

  always_ff @(posedge clk)
    clrdog_q <= clrdog;

  always_ff @(posedge clk) begin
    if (test && tload) begin
      count <= count_ld[WIDTH-1:0];
    end else if (clrdog_q && !test) begin
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (modrst || wdclr)                 wdfl <= 1'b0;
    else if (count == WIDTH'(TIMEOUT))   wdfl <= 1'b1;
  end

  assign sdo7    = wdfl;
  assign sdo7_en = status_rd;

  assign sdo    = tbyte;
  assign sdo_en = test && tread;
endmodule
