`timescale 1ns/1ps
// digital_unit - the clockless control logic of the electrode driver.
//
// It is driven only by the pulses it receives: clk is the clock extracted
// from the Vin pulse train by the data demodulation block and shr the
// demodulated bit. Three blocks work together. The reset block spots the
// '1111' sequence that opens every control word. The data storage block
// writes the following 2*N_EL bits into Reg1 and drives the output stage
// switches from Reg2. The mode selection block counts the bits, checks the
// word, and steps through the operating modes U1U0 (00 reception,
// 01 first phase, 11 interphase delay, 10 second phase), one mode per
// further Vin pulse. por is the chip's power-on reset; the reset sequence
// resets only this unit.
//
// Interface: v_c[k] / v_a[k] close the cathodic / anodic switch of
// electrode k; u is the operating mode; err is high after a rejected word.
// Timing: all state changes on the falling edge of clk. Two assertions
// guard the switch outputs: never both switches of an electrode, and the
// first phase is only ever followed by the interphase delay (or by a
// restart to reception).
//
// The partition into three blocks, their connections and the registers
// follow the design description; the details inside each block are
// documented there.
module digital_unit
  import rdm_pkg::*;
#(
  parameter int unsigned N_EL = rdm_pkg::N_EL_DEFAULT
) (
  input  logic            clk,
  input  logic            por,
  input  logic            shr,
  output logic [N_EL-1:0] v_c,
  output logic [N_EL-1:0] v_a,
  output mode_e           u,
  output logic            err
);

  logic              seq_rst, load_en, e;
  logic [2*N_EL-1:0] b;
  reg2_op_e          reg2_op;

  reset_block u_reset (
    .clk    (clk),
    .por    (por),
    .shr    (shr),
    .seq_rst(seq_rst)
  );

  mode_selection #(.N_EL(N_EL)) u_mode (
    .clk    (clk),
    .por    (por),
    .seq_rst(seq_rst),
    .b      (b),
    .load_en(load_en),
    .e      (e),
    .reg2_op(reg2_op),
    .u      (u),
    .err    (err)
  );

  data_storage #(.N_EL(N_EL)) u_store (
    .clk    (clk),
    .por    (por),
    .seq_rst(seq_rst),
    .load_en(load_en),
    .err_clr(e),
    .reg2_op(reg2_op),
    .shr    (shr),
    .b      (b),
    .v_c    (v_c),
    .v_a    (v_a)
  );

  // Safety rule of the chip: no electrode may ever have its anodic and
  // cathodic switch closed together (that would short Iin to the return).
  a_no_short: assert property (@(negedge clk) disable iff (por) !(|(v_c & v_a)))
    else $error("electrode with both switches closed");

  // The mode only moves along 00 -> 01 -> 11 -> 10 -> 00, or back to 00.
  a_mode_order: assert property (@(negedge clk) disable iff (por)
      (u == MODE_PH1) |=> (u == MODE_PH1 || u == MODE_IPD || u == MODE_RX))
    else $error("illegal mode step after the first phase");

endmodule
