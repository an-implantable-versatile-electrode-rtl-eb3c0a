`timescale 1ns/1ps
// gray_counter - W-bit counter that steps through the reflected binary Gray
// code, so exactly one flip-flop toggles per count. Used by the data storage
// block to address the Reg1 flip-flops while the control bits are loaded,
// which keeps switching activity (and power) low.
//
// Interface: clk (acts on its falling edge, like the whole digital unit),
// por (asynchronous reset to zero), clr (synchronous clear), en (count one
// step), gray (current code). The next code is formed by decoding the
// current one to binary, adding one and re-encoding.
module gray_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         por,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] gray
);

  logic [W-1:0] bin, bin_next;

  // Gray to binary: each binary bit is the XOR of all Gray bits above it.
  always_comb begin
    bin[W-1] = gray[W-1];
    for (int i = int'(W) - 2; i >= 0; i--)
      bin[i] = bin[i+1] ^ gray[i];
  end

  assign bin_next = bin + 1'b1;

  always_ff @(negedge clk or posedge por) begin
    if (por)
      gray <= '0;
    else if (clr)
      gray <= '0;
    else if (en)
      gray <= bin_next ^ (bin_next >> 1);
  end

endmodule
