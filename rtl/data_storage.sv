`timescale 1ns/1ps
// data_storage - the two 2*N_EL-bit registers of the digital unit.
//
// Reg1 is a serial-in, parallel-out register. Rather than shifting, each
// received control bit is written straight into its own flip-flop, chosen
// by a Gray-code counter (gray_counter) whose code is decoded directly into
// a flip-flop select; the k-th control bit after the reset sequence lands in
// b[k]. Bit order follows the control word: b[2k] = Ck (cathodic switch of
// electrode k), b[2k+1] = Ak (anodic switch). Reg1 is cleared by the reset
// sequence (seq_rst) and by the error output e of the mode selection block.
//
// Reg2 is a parallel-in, parallel-out register whose bits drive the output
// stage switches directly (v_c[k], v_a[k]). The mode selection block tells
// it on each edge what to load (reg2_op): Reg1 as received for the first
// phase, all switches open for the interphase delay, Reg1 with anode and
// cathode swapped for the second phase, and all cathodic switches closed
// after the second phase so every electrode is tied to the reference and
// discharges. Power-on reset puts Reg2 in that discharge state.
//
// The two registers, the Gray-code addressing and the phase sequence follow
// the design description. Writing one flip-flop per bit through a decoded
// address, and using the discharge state also after power-on, are this
// implementation's choices.
//
// Timing: everything acts on the falling edge of the extracted clock clk;
// shr then holds the bit demodulated during the previous bit period.
module data_storage
  import rdm_pkg::*;
#(
  parameter int unsigned N_EL = rdm_pkg::N_EL_DEFAULT
) (
  input  logic              clk,
  input  logic              por,
  input  logic              seq_rst,   // reset sequence seen (reset block)
  input  logic              load_en,   // write shr into Reg1 at the counter address
  input  logic              err_clr,   // e: clear Reg1 after a failed check
  input  reg2_op_e          reg2_op,
  input  logic              shr,
  output logic [2*N_EL-1:0] b,         // Reg1 contents, to the error check
  output logic [N_EL-1:0]   v_c,       // Reg2: cathodic switch controls
  output logic [N_EL-1:0]   v_a        // Reg2: anodic switch controls
);

  localparam int unsigned NB = 2 * N_EL;
  localparam int unsigned AW = $clog2(NB);

  logic [AW-1:0] addr_gray;
  logic [N_EL-1:0] stored_c, stored_a;

  gray_counter #(.W(AW)) u_addr_cnt (
    .clk (clk),
    .por (por),
    .clr (seq_rst),
    .en  (load_en && !seq_rst),
    .gray(addr_gray)
  );

  // Gray code of a binary count.
  function automatic logic [AW-1:0] to_gray(input int unsigned k);
    return AW'(k ^ (k >> 1));
  endfunction

  // Reg1
  always_ff @(negedge clk or posedge por) begin
    if (por)
      b <= '0;
    else if (seq_rst || err_clr)
      b <= '0;
    else if (load_en) begin
      // Flip-flop k is selected when the counter shows the Gray code of k.
      for (int unsigned k = 0; k < NB; k++)
        if (addr_gray == to_gray(k))
          b[k] <= shr;
    end
  end

  always_comb begin
    for (int k = 0; k < int'(N_EL); k++) begin
      stored_c[k] = b[2*k];
      stored_a[k] = b[2*k+1];
    end
  end

  // Reg2
  always_ff @(negedge clk or posedge por) begin
    if (por) begin
      v_c <= '1;
      v_a <= '0;
    end else begin
      unique case (reg2_op)
        R2_HOLD:      ;
        R2_FORWARD:   begin v_c <= stored_c; v_a <= stored_a; end
        R2_OPEN:      begin v_c <= '0;       v_a <= '0;       end
        R2_REVERSE:   begin v_c <= stored_a; v_a <= stored_c; end
        R2_DISCHARGE: begin v_c <= '1;       v_a <= '0;       end
        default:      begin v_c <= '0;       v_a <= '0;       end
      endcase
    end
  end

endmodule
