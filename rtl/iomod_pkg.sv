// Shared constants and types of the VMEbus I/O module controller.
//
// The state codes are the six-bit values printed beside each state of the
// controller's state diagram; they are kept exactly so that the state
// variables match the original assignment (a near-Gray ordering in which most
// transitions flip one bit). The string printed in the diagram is a binary
// number read left to right as code[5:0]; the original names its most
// significant variable Q0, so code[5] is Q0 and code[0] is Q5. The address-modifier codes, the interrupt
// vector, the broadcast and initialisation short addresses and the watchdog
// timeout are the values the specification of the module gives.
package iomod_pkg;

  // Address modifier codes accepted by the module.
  localparam logic [5:0] AM_STD_A = 6'h39;  // standard, non-privileged data
  localparam logic [5:0] AM_STD_B = 6'h3D;  // standard, supervisory data
  localparam logic [5:0] AM_SHORT = 6'h2D;  // short, supervisory

  // Interrupt acknowledge vector returned during initialisation.
  localparam logic [7:0] IACK_VECTOR = 8'h41;

  // Interrupt level answered by the module (IRQ6*).
  localparam logic [2:0] IRQ_LEVEL = 3'd6;

  // Short-address broadcast that disables all outputs (A15..A1 of 0122h).
  localparam logic [14:0] BCAST_OUTDIS = 15'h0122 >> 1;

  // Logical address held after reset: 10000b, so that 0100h + 2*16 = 0120h
  // is the only short address answered during initialisation.
  localparam logic [4:0] LOGADDR_RESET = 5'b10000;

  // Watchdog: timeout at 2**23 SYSCLK edges (524 ms at 16 MHz).
  localparam int unsigned WD_WIDTH   = 24;
  localparam int unsigned WD_TIMEOUT = 8_388_608;

  // Controller states with the codes of the state diagram.
  typedef enum logic [5:0] {
    S0  = 6'b000000, S1  = 6'b000010, S2  = 6'b000110, S3  = 6'b000111,
    S4  = 6'b010010, S5  = 6'b010011, S6  = 6'b010101, S7  = 6'b010110,
    S8  = 6'b010100, S9  = 6'b000100, S10 = 6'b100100, S11 = 6'b100101,
    S12 = 6'b110101, S13 = 6'b101100, S14 = 6'b111100, S15 = 6'b011100,
    S16 = 6'b001100, S17 = 6'b001110, S18 = 6'b001101, S19 = 6'b001111,
    S20 = 6'b101110, S21 = 6'b100110, S22 = 6'b011101, S23 = 6'b011011,
    S24 = 6'b001011, S25 = 6'b001000, S26 = 6'b000011, S27 = 6'b111110,
    S28 = 6'b110011, S29 = 6'b000001, S30 = 6'b100001, S31 = 6'b100000,
    S32 = 6'b010001, S33 = 6'b001010, S34 = 6'b001001, S35 = 6'b101001,
    S36 = 6'b110001
  } sm_state_t;

  // Controller outputs, all active high inside the chip; the pin-level
  // polarity is applied at the top level.
  typedef struct packed {
    logic modrst;   // module reset (MODRST*)
    logic irq6;     // interrupt request level six
    logic a0sm;     // second byte of a word transfer
    logic vecen;    // drive the interrupt vector (VECEN*)
    logic datalat;  // latch module bus into a VMEbus transceiver
    logic datadr;   // transceiver drive enable
    logic dtack;    // data transfer acknowledge
    logic smtrig;   // bus error sampling point
    logic busreq;   // request for the module data bus (BUSREQ*)
    logic read;     // read strobe to module devices (READ*)
    logic write;    // write strobe to module devices (WRITE*)
    logic wdtrig;   // pet the watchdog (WDTRIG*)
    logic addrlat;  // end of initialisation (ADDRLAT)
  } sm_out_t;

endpackage
