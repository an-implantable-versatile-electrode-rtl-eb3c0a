`timescale 1ns/1ps
// power_on_reset - behavioural model of the power-on-reset block. It is an
// analog circuit on chip that watches the storage capacitor voltage VDD;
// here its input is a logic flag vdd_ok that is high while VDD is up.
//
// por is a pulse of T_POR_NS that starts when the supply comes up (the
// logic is unpowered, and por low, while it is down). The rising edge is
// what resets the asynchronously reset flip-flops. The supply must be held down
// for at least T_POR_NS after time zero, as it is after any real power-up,
// so that the delayed copy of vdd_ok starts out low. It resets the whole chip: the
// demodulator flip-flops and the digital unit.
//
// That the PoR resets the logic when VDD rises, with a single pulse,
// follows the design description and its power-up waveform; the pulse width is not given and T_POR_NS is this model's
// choice.
module power_on_reset #(
  parameter real T_POR_NS = 1000.0
) (
  input  logic vdd_ok,
  output logic por
);

  logic vdd_settled;  // vdd_ok seen T_POR_NS ago

  assign #(T_POR_NS) vdd_settled = vdd_ok;
  assign por = vdd_ok && !vdd_settled;

endmodule
