// Controller state machine of the VMEbus I/O module.
//
// A Moore machine of 37 states clocked by the VMEbus system clock. It
// sequences the module through power-up initialisation (interrupt request on
// level six, the interrupt-acknowledge response with the module vector, then
// the write of the physical and logical addresses) and through every VMEbus
// read or write to the module: decode delay, bus-error test, arbitration for
// the 8-bit module data bus, the read or write strobe sequence (twice, one byte
// at a time, for a word), the acknowledge and the watchdog pet.
//
// States, their codes and the outputs active in each are those of the state
// diagram of the design; transitions follow it edge by edge. State 30 drives
// A0SM only when entered from state 35 (second byte of a word write), so that
// output also depends on the previous state. A state register holding a code
// that is not one of the 37 is detected and forced to state 0 at the next
// clock; the ILLEGAL flag then stays set until the next system reset or
// test-mode load so that a tester can read it.
//
// Outputs are registered: each clock loads the outputs of the state being
// entered, so they change together with the state variables and never glitch.
// WRITE is suppressed while writedis is high (writes to offset 0002 and the
// module-reset command must not reach the module devices).
//
// Reset: sysreset_n asserts asynchronously and is released through a
// synchroniser, putting the machine in state 0 where MODRST resets the rest
// of the chip. In test mode, tload loads the state variables from tdata so any
// state, legal or not, can be set up (this design's own encoding of the test
// access).
//
// Inputs are expected synchronous to clk (the caller synchronises them).
module state_machine
  import iomod_pkg::*;
(
  input  logic       clk,
  input  logic       sysreset_n,  // VMEbus SYSRESET*, asynchronous
  input  logic       dsenable,    // a data strobe is active
  input  logic       respond,     // interrupt acknowledge to this module
  input  logic       vmeacc,      // valid access to the module
  input  logic       berr,        // bus error condition
  input  logic       vmeramen,    // module data bus granted to the ASIC
  input  logic       rdwr,        // 1 = read cycle
  input  logic       singdoub,    // 1 = single byte, 0 = word
  input  logic       wrbd,        // both addresses written at initialisation
  input  logic       rstsm,       // module reset command pending
  input  logic       writedis,    // suppress WRITE for this cycle
  input  logic       tload,       // test: load state variables
  input  logic [5:0] tdata,       // test: state value to load
  output sm_out_t    out,
  output logic [5:0] q,           // state variables
  output logic       illegal      // illegal state was detected
);

  logic rst_sync_n;
  sync_ff #(.WIDTH(1), .RESET_VAL(1'b0)) u_rst_sync (
    .clk(clk), .rst_n(sysreset_n), .d(1'b1), .q(rst_sync_n)
  );

  sm_state_t state, nxt;
  logic      legal;

  // Next-state function of the state diagram.
  always_comb begin
    legal = 1'b1;
    nxt   = state;
    unique case (state)
      S0:  nxt = S1;
      S1:  nxt = dsenable ? S2 : S1;
      S2:  nxt = S3;
      S3:  nxt = S4;
      S4:  nxt = respond ? S5 : S1;
      S5:  nxt = S6;
      S6:  nxt = S7;
      S7:  nxt = S8;
      S8:  nxt = dsenable ? S8 : S9;
      S9:  nxt = S10;
      S10: nxt = dsenable ? S11 : S10;
      S11: nxt = !vmeacc ? S10 : (dsenable ? S12 : S11);
      S12: nxt = S13;
      S13: nxt = !berr ? S14 : (dsenable ? S13 : S10);
      S14: nxt = !vmeramen ? S14 : (rdwr ? S15 : S27);
      // read sequence
      S15: nxt = S16;
      S16: nxt = S17;
      S17: nxt = S18;
      S18: nxt = singdoub ? S19 : S22;
      S22: nxt = S23;
      S23: nxt = S24;
      S24: nxt = S25;
      S25: nxt = S26;
      S26: nxt = S19;
      S19: nxt = S20;
      S20: nxt = dsenable ? S20 : S21;
      S21: nxt = S10;
      // write sequence
      S27: nxt = S28;
      S28: nxt = S29;
      S29: nxt = singdoub ? S30 : S32;
      S32: nxt = S33;
      S33: nxt = S34;
      S34: nxt = S35;
      S35: nxt = S30;
      S30: nxt = (respond && wrbd) ? S36 : S31;
      S36: nxt = S31;
      S31: nxt = dsenable ? S31 : (rstsm ? S0 : S10);
      default: begin
        legal = 1'b0;
        nxt   = S0;
      end
    endcase
  end

  // Outputs active in a state (A0SM of state 30 handled separately).
  function automatic sm_out_t outputs_of(sm_state_t s);
    sm_out_t o;
    o = '0;
    unique case (s)
      S0:  o.modrst = 1'b1;
      S1, S2, S3, S4: o.irq6 = 1'b1;
      S5:  begin o.a0sm = 1'b1; o.vecen = 1'b1; end
      S6:  begin o.a0sm = 1'b1; o.vecen = 1'b1; o.datalat = 1'b1; end
      S7:  begin o.a0sm = 1'b1; o.vecen = 1'b1; o.datadr = 1'b1; end
      S8:  begin o.datadr = 1'b1; o.dtack = 1'b1; end
      S9:  o.dtack = 1'b1;
      S10, S11, S12: ;
      S13: o.smtrig = 1'b1;
      S14: o.busreq = 1'b1;
      S15: begin o.busreq = 1'b1; o.datadr = 1'b1; end
      S16, S18: begin o.busreq = 1'b1; o.read = 1'b1; end
      S17: begin o.busreq = 1'b1; o.read = 1'b1; o.datalat = 1'b1; end
      S22: begin o.busreq = 1'b1; o.a0sm = 1'b1; end
      S23, S24, S26: begin o.busreq = 1'b1; o.a0sm = 1'b1; o.read = 1'b1; end
      S25: begin o.busreq = 1'b1; o.a0sm = 1'b1; o.read = 1'b1; o.datalat = 1'b1; end
      S19: o.datadr = 1'b1;
      S20: begin o.dtack = 1'b1; o.datadr = 1'b1; end
      S21, S31: begin o.dtack = 1'b1; o.wdtrig = 1'b1; end
      S27: begin o.busreq = 1'b1; o.datadr = 1'b1; end
      S28, S29: begin o.busreq = 1'b1; o.write = 1'b1; o.datadr = 1'b1; end
      S32, S30: begin o.busreq = 1'b1; o.datadr = 1'b1; end
      S33: begin o.busreq = 1'b1; o.datadr = 1'b1; o.a0sm = 1'b1; end
      S34, S35: begin o.busreq = 1'b1; o.datadr = 1'b1; o.a0sm = 1'b1; o.write = 1'b1; end
      S36: begin o.busreq = 1'b1; o.addrlat = 1'b1; end
      default: o.modrst = 1'b1;
    endcase
    return o;
  endfunction

  sm_out_t nxt_out;
  always_comb begin
    nxt_out = outputs_of(nxt);
    if (nxt == S30) nxt_out.a0sm = (state == S35);
    if (writedis)   nxt_out.write = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_sync_n) begin
    if (!rst_sync_n) begin
      state   <= S0;
      out     <= '0;
      out.modrst <= 1'b1;
      illegal <= 1'b0;
    end else if (tload) begin
      state   <= sm_state_t'(tdata);
      out     <= '0;
      illegal <= 1'b0;
    end else begin
      state   <= nxt;
      out     <= nxt_out;
      illegal <= illegal | !legal;
    end
  end

  assign q = state;

endmodule
