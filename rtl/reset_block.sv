`timescale 1ns/1ps
// reset_block - detects the reset sequence at the head of a control word.
//
// The chip has no clock of its own. Every received bit produces one pulse
// of the extracted clock clk, and the digital unit acts on the falling edge
// of clk, which comes at the start of the next bit; at that edge shr holds
// the previously demodulated bit. This block counts consecutive '1' bits in
// shr with a small saturating counter. While the RESET_ONES-th consecutive
// '1' is present, seq_rst is high, so the rest of the digital unit is reset
// synchronously on that same edge. A '0' clears the count. Further '1's in
// the same run do not re-assert seq_rst: the first control bit C0 may be a
// '1' and then extends the run to five.
//
// The reset sequence length of four '1's and the use of counters follow
// the design description; the saturating counter and firing once per run
// are this implementation's choices. A valid control word cannot contain
// the sequence, because any run of three '1's in it covers both switches
// of one electrode, which the error check rejects.
//
// Interface: clk (extracted clock, active on its falling edge), por
// (asynchronous power-on reset), shr (demodulated bit), seq_rst (combinational,
// valid for the current falling edge).
module reset_block #(
  parameter int unsigned RESET_ONES = rdm_pkg::RESET_ONES
) (
  input  logic clk,
  input  logic por,
  input  logic shr,
  output logic seq_rst
);

  localparam int unsigned CW = $clog2(RESET_ONES + 1);

  logic [CW-1:0] ones_cnt;

  // The current bit completes the sequence when RESET_ONES-1 ones came before.
  assign seq_rst = shr && (ones_cnt == CW'(RESET_ONES - 1));

  always_ff @(negedge clk or posedge por) begin
    if (por)
      ones_cnt <= '0;
    else if (!shr)
      ones_cnt <= '0;
    else if (ones_cnt < CW'(RESET_ONES))
      ones_cnt <= ones_cnt + 1'b1;
  end

endmodule
