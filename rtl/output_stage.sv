`timescale 1ns/1ps
// output_stage - behavioural model of the high-voltage output stage. On
// chip it is analog: per electrode a 30 V PDMOS anodic switch to node N
// (where the external stimulus current Iin enters) and a 30 V NDMOS
// cathodic switch to node G (the return, level-shifted above Vss during
// stimulation). Each closed anodic switch is biased by a 5 uA current that
// is taken from Iin. This model turns switch settings and Iin into the
// electrode currents; it is not synthesizable.
//
// With nA electrodes whose anodic switch alone is closed and nC whose
// cathodic switch alone is closed, the stimulus current is
//   Istim = Iin - nA * I_BIAS_UA
// and, with equal electrode loads, each anode sources +Istim/nA and each
// cathode sinks Istim/nC (currents into the tissue are positive). Without
// at least one anode and one cathode no current flows. An electrode with
// both switches closed shorts N to G: the model flags short_fault and
// delivers no electrode current. All-cathodic settings (discharge) connect
// every electrode to the reference and carry no stimulus current.
//
// The switch topology, the 5 uA anodic bias and the bias being drawn from
// Iin follow the design description; equal loads and the ideal switches
// are this model's assumptions.
//
// Interface: v_c / v_a (switch controls from Reg2), i_in_ua (Iin in uA),
// i_el_ua (per-electrode current in uA), i_stim_ua (total stimulus
// current), short_fault. Purely combinational.
module output_stage #(
  parameter int unsigned N_EL      = 13,
  parameter real         I_BIAS_UA = 5.0
) (
  input  logic [N_EL-1:0] v_c,
  input  logic [N_EL-1:0] v_a,
  input  real             i_in_ua,
  output real             i_el_ua [N_EL],
  output real             i_stim_ua,
  output logic            short_fault
);

  int unsigned n_an, n_ca;
  logic [N_EL-1:0] is_an, is_ca;

  assign is_an       = v_a & ~v_c;
  assign is_ca       = v_c & ~v_a;
  assign short_fault = |(v_a & v_c);

  always_comb begin
    n_an = 0;
    n_ca = 0;
    for (int k = 0; k < int'(N_EL); k++) begin
      n_an += 32'(is_an[k]);
      n_ca += 32'(is_ca[k]);
    end
    if (short_fault || n_an == 0 || n_ca == 0)
      i_stim_ua = 0.0;
    else begin
      i_stim_ua = i_in_ua - I_BIAS_UA * real'(n_an);
      if (i_stim_ua < 0.0)
        i_stim_ua = 0.0;
    end
    for (int k = 0; k < int'(N_EL); k++) begin
      if (i_stim_ua > 0.0 && is_an[k])
        i_el_ua[k] = i_stim_ua / real'(n_an);
      else if (i_stim_ua > 0.0 && is_ca[k])
        i_el_ua[k] = -i_stim_ua / real'(n_ca);
      else
        i_el_ua[k] = 0.0;
    end
  end

endmodule
