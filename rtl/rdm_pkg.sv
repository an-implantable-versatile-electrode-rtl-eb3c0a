`timescale 1ns/1ps
// rdm_pkg - types and constants shared by the electrode-driver digital unit.
//
// The control word sent over the Vin wire is 32 bits long: four '1' bits
// (the reset sequence), 2*N_EL control bits ordered C0, A0, C1, A1, ...,
// C12, A12, and two dummy '0' bits that clock in the last control bit and
// trigger the error check. Bit 2k of the stored pattern closes the cathodic
// switch of electrode k, bit 2k+1 its anodic switch.
//
// The operating mode is the 2-bit code U1U0 printed in the mode table of
// the design: 00 data reception, 01 first stimulus phase, 11 interphase
// delay, 10 second stimulus phase. Consecutive modes differ in one bit.
package rdm_pkg;

  // Electrodes driven by the RDM1 chip (12 on the array, 1 subcutaneous).
  localparam int unsigned N_EL_DEFAULT     = 13;
  // Length of the all-ones reset sequence at the head of a control word.
  localparam int unsigned RESET_ONES       = 4;

  typedef enum logic [1:0] {
    MODE_RX    = 2'b00,  // data reception and demodulation
    MODE_PH1   = 2'b01,  // first stimulus phase
    MODE_IPD   = 2'b11,  // interphase delay
    MODE_PH2   = 2'b10   // second stimulus phase
  } mode_e;

  // What Reg2 does on a clock edge, issued by the mode selection block.
  typedef enum logic [2:0] {
    R2_HOLD      = 3'd0,  // keep the current switch pattern
    R2_FORWARD   = 3'd1,  // copy Reg1: stored cathodes/anodes as sent
    R2_OPEN      = 3'd2,  // all switches off, electrodes floating
    R2_REVERSE   = 3'd3,  // copy Reg1 with anode and cathode roles swapped
    R2_DISCHARGE = 3'd4   // every cathodic switch on: electrodes to reference
  } reg2_op_e;

endpackage
