`timescale 1ns/1ps
// data_demodulation - behavioural model of the analog data demodulation
// block: a monostable plus output flip-flop. It is not synthesizable logic;
// the monostable is an analog current-starved capacitor circuit on chip.
//
// The hub sends each bit as a low pulse on Vin: a short one (250 ns) is a
// '0', a long one (1.5 us) a '1'. Every falling edge of Vin fires the
// monostable, which stays high for T_MONO_NS (800 ns nominal, between the
// two pulse widths; 880 ns was the measured average). The extracted clock
// clk is the inverted monostable output, so it falls with Vin and rises
// T_MONO_NS later. On that rising edge a flip-flop (FF3) samples the
// inverted Vin: Vin still low means a long pulse, shr = 1; Vin already high
// means a short pulse, shr = 0. shr therefore changes T_MONO_NS after a
// bit starts and holds until the next bit is sampled.
//
// The pulse widths, the monostable duration and the sampling scheme follow
// the design description. A falling edge that arrives while the monostable
// is still running is ignored here (the circuit's retrigger behaviour is
// not described), and power-on reset clears shr and stops the monostable.
//
// Interface: vin (supply-and-data input, logic level), por (power-on reset,
// active high), clk (extracted clock), shr (demodulated bit).
module data_demodulation #(
  parameter real T_MONO_NS = 800.0
) (
  input  logic vin,
  input  logic por,
  output logic clk,
  output logic shr
);

  logic mono;

  // Monostable: fires on each falling Vin edge while out of reset and
  // falls back T_MONO_NS later.
  always @(negedge vin or posedge por) begin
    if (por)
      mono <= 1'b0;
    else if (!mono) begin
      mono <= 1'b1;
      mono <= #(T_MONO_NS) 1'b0;
    end
  end

  assign clk = !mono;

  // FF3: samples the inverted input at the end of the monostable pulse.
  always_ff @(posedge clk or posedge por) begin
    if (por)
      shr <= 1'b0;
    else
      shr <= !vin;
  end

endmodule
