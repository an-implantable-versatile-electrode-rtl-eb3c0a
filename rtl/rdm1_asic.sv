`timescale 1ns/1ps
// rdm1_asic - the electrode-driving chip (RDM1 version, 13 electrodes).
//
// The chip sits on an epidural electrode array and talks to an implanted
// hub over three wires: Vss, Vin and Iin. Vin carries the supply, the
// control data and the stimulus timing all at once: it idles high (5 V,
// charging an on-chip storage capacitor) and every bit is a low pulse,
// short for '0' and long for '1'. Iin is the stimulus current, generated by
// the hub and only switched onto the electrodes here. There is no clock:
// the logic runs on the pulses it receives.
//
// One stimulation cycle is a 32-pulse control word - '1111', 26 switch
// bits C0 A0 ... C12 A12, '00' - followed by four timing pulses that start
// the first phase, the interphase delay, the second phase (anodes and
// cathodes swapped) and the return to reception, during which all
// electrodes are tied to the reference. A word that closes both switches
// of an electrode, or names no cathode or no anode, is rejected and the
// cycle passes with all switches open.
//
// Blocks: power_on_reset and data_demodulation (behavioural models of
// analog circuits), digital_unit (synthesizable: reset block, mode
// selection, data storage), output_stage (behavioural model of the HV
// switches and their bias). The storage capacitor, current reference and
// current mirrors have no logic function; the capacitor's state enters as
// vdd_ok and the anodic bias current is part of the output stage model.
//
// Interface: vdd_ok (VDD up), vin (logic level of Vin), i_in_ua (Iin in
// uA); i_el_ua (electrode currents in uA, positive into the tissue), v_c /
// v_a (switch controls), u (operating mode U1U0), err (last word rejected),
// short_fault (an electrode has both switches closed; never expected).
module rdm1_asic
  import rdm_pkg::*;
#(
  parameter int unsigned N_EL      = rdm_pkg::N_EL_DEFAULT,
  parameter real         T_MONO_NS = 800.0,
  parameter real         T_POR_NS  = 1000.0,
  parameter real         I_BIAS_UA = 5.0
) (
  input  logic            vdd_ok,
  input  logic            vin,
  input  real             i_in_ua,
  output real             i_el_ua [N_EL],
  output real             i_stim_ua,
  output logic [N_EL-1:0] v_c,
  output logic [N_EL-1:0] v_a,
  output mode_e           u,
  output logic            err,
  output logic            short_fault
);

  logic por, clk, shr;

  power_on_reset #(.T_POR_NS(T_POR_NS)) u_por (
    .vdd_ok(vdd_ok),
    .por   (por)
  );

  data_demodulation #(.T_MONO_NS(T_MONO_NS)) u_demod (
    .vin(vin),
    .por(por),
    .clk(clk),
    .shr(shr)
  );

  digital_unit #(.N_EL(N_EL)) u_digital (
    .clk(clk),
    .por(por),
    .shr(shr),
    .v_c(v_c),
    .v_a(v_a),
    .u  (u),
    .err(err)
  );

  output_stage #(.N_EL(N_EL), .I_BIAS_UA(I_BIAS_UA)) u_out (
    .v_c        (v_c),
    .v_a        (v_a),
    .i_in_ua    (i_in_ua),
    .i_el_ua    (i_el_ua),
    .i_stim_ua  (i_stim_ua),
    .short_fault(short_fault)
  );

endmodule
