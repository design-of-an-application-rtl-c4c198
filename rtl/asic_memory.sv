// On-chip memory block of the VMEbus I/O module controller.
//
// Holds the data the chip itself supplies on the 8-bit module data bus:
//   * the interrupt-acknowledge vector (41h), driven while the controller
//     asserts VECEN during the initialisation interrupt acknowledge;
//   * the eight-bit physical address and the logical address, written during
//     initialisation by short-mode cycles to 0120h (byte ZERO = physical,
//     byte ONE = logical; two byte cycles in either order, or one word).
//     WRB0/WRB1 record each write and WRBD tells the controller that both
//     are done. After initialisation (RESPOND cleared) the registers are
//     read-only.
// Reads: offset 0000 byte ZERO returns the physical address, offset FFFE
// returns the physical address in byte ZERO and the logical address in byte
// ONE. Data is captured from the module bus on every clock in which the
// controller's WRITE strobe is active for such a cycle, so the value present
// at the end of the strobe is kept. sdo_en enables the chip's data-bus drivers.
// Which byte of 0120h carries which address is this design's choice (the same
// layout as offset FFFE).
//
// Test mode: tst_load writes the register selected by tst_sel from the data
// bus at a clock edge, and tst_read drives it onto the bus (highest priority).
module asic_memory
  import iomod_pkg::*;
(
  input  logic       clk,
  input  logic       modrst,
  input  logic       respond,   // initialisation in progress
  input  logic       short_la,  // short cycle to 0100h+2*LA (0120h at init)
  input  logic       write,     // controller write strobe
  input  logic       read,      // controller read strobe
  input  logic       vecen,     // drive the interrupt vector
  input  logic       a0,        // byte on the module bus
  input  logic       addr0,     // offset 0000 byte ZERO
  input  logic       addre,     // offset FFFE
  input  logic       tst_load,  // test: load the register selected by tst_sel
  input  logic       tst_read,  // test: drive the register selected by tst_sel
  input  logic       tst_sel,   // test: 0 = physical, 1 = logical address
  input  logic [7:0] sdi,
  output logic [7:0] sdo,
  output logic       sdo_en,
  output logic [7:0] phys,
  output logic [7:0] logical,
  output logic       wrb0,
  output logic       wrb1,
  output logic       wrbd
);
  always_ff @(posedge clk) begin
    if (modrst) begin
      phys    <= '0;
      logical <= '0;
      wrb0    <= 1'b0;
      wrb1    <= 1'b0;
    end else if (tst_load) begin
      if (!tst_sel) phys    <= sdi;
      else          logical <= sdi;
    end else if (respond && short_la && write) begin
      if (!a0) begin phys    <= sdi; wrb0 <= 1'b1; end
      else     begin logical <= sdi; wrb1 <= 1'b1; end
    end
  end

  assign wrbd = wrb0 && wrb1;

  always_comb begin
    sdo    = '0;
    sdo_en = 1'b0;
    if (tst_read) begin
      sdo = tst_sel ? logical : phys; sdo_en = 1'b1;
    end else if (vecen) begin
      sdo = IACK_VECTOR; sdo_en = 1'b1;
    end else if (read && (addr0 || (addre && !a0))) begin
      sdo = phys;        sdo_en = 1'b1;
    end else if (read && addre && a0) begin
      sdo = logical;     sdo_en = 1'b1;
    end
  end
endmodule
