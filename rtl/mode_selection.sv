`timescale 1ns/1ps
// mode_selection - sequencer of the digital unit.
//
// After the reset sequence it counts 2*N_EL clock pulses while the control
// bits are written into Reg1, then stops loading. The next pulse (the
// second dummy '0' of the word) runs the safety check on Reg1: the word is
// rejected if any electrode has both its switches on, or if no electrode is
// a cathode, or none an anode. On a rejected word, output e clears Reg1, so
// every later phase drives all switches off and nothing is stimulated.
//
// Every further pulse on Vin is a timing mark sent by the hub and moves
// the operating mode one step along
//   00 data reception -> 01 first phase -> 11 interphase delay
//   -> 10 second phase -> 00 data reception,
// and tells Reg2 what to load at the same edge (reg2_op). Back in 00, the
// block waits for the next reset sequence; pulses in between are ignored.
// The reset sequence restarts the block from any state.
//
// The mode codes U1U0, the bit count, the error rules and the sequence of
// phases follow the design description. The explicit state encoding, one
// timing pulse per phase boundary, and the sticky err flag (kept until the
// next reset sequence, for observation) are this implementation's choices.
//
// Timing: acts on the falling edge of clk, i.e. at the start of each Vin
// pulse. With the word on pulses 0..31, the first phase starts on pulse 32,
// the interphase delay on 33, the second phase on 34 and it ends on 35.
module mode_selection
  import rdm_pkg::*;
#(
  parameter int unsigned N_EL = rdm_pkg::N_EL_DEFAULT
) (
  input  logic              clk,
  input  logic              por,
  input  logic              seq_rst,
  input  logic [2*N_EL-1:0] b,
  output logic              load_en,
  output logic              e,
  output reg2_op_e          reg2_op,
  output mode_e             u,
  output logic              err
);

  localparam int unsigned NB = 2 * N_EL;
  localparam int unsigned CW = $clog2(NB + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_CHECK, S_READY, S_PH1, S_IPD, S_PH2
  } state_e;

  state_e        state;
  logic [CW-1:0] cnt;
  logic [N_EL-1:0] cath, anod;
  logic          word_bad;

  always_comb begin
    for (int k = 0; k < int'(N_EL); k++) begin
      cath[k] = b[2*k];
      anod[k] = b[2*k+1];
    end
  end

  assign word_bad = (|(cath & anod)) || !(|cath) || !(|anod);

  assign load_en = (state == S_LOAD);
  assign e       = (state == S_CHECK) && word_bad && !seq_rst;

  always_comb begin
    unique case (state)
      S_PH1:   u = MODE_PH1;
      S_IPD:   u = MODE_IPD;
      S_PH2:   u = MODE_PH2;
      default: u = MODE_RX;
    endcase
  end

  always_comb begin
    if (seq_rst)
      reg2_op = R2_DISCHARGE;
    else begin
      unique case (state)
        S_READY: reg2_op = R2_FORWARD;
        S_PH1:   reg2_op = R2_OPEN;
        S_IPD:   reg2_op = R2_REVERSE;
        S_PH2:   reg2_op = R2_DISCHARGE;
        default: reg2_op = R2_HOLD;
      endcase
    end
  end

  always_ff @(negedge clk or posedge por) begin
    if (por) begin
      state <= S_IDLE;
      cnt   <= '0;
      err   <= 1'b0;
    end else if (seq_rst) begin
      state <= S_LOAD;
      cnt   <= '0;
      err   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_LOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NB - 1))
            state <= S_CHECK;
        end
        S_CHECK: begin
          err   <= word_bad;
          state <= S_READY;
        end
        S_READY: state <= S_PH1;
        S_PH1:   state <= S_IPD;
        S_IPD:   state <= S_PH2;
        S_PH2:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
