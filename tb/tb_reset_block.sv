`timescale 1ns/1ps
// tb_reset_block - self-checking test of the reset-sequence detector.
// Feeds random bit streams (biased towards '1' so that long runs occur)
// and compares seq_rst before every falling clock edge with a reference
// run-length count. Also checks that power-on reset clears the count.
module tb_reset_block;
  logic clk = 1'b1, por = 1'b0, shr = 1'b0, seq_rst;
  int checks = 0, failures = 0, ref_run = 0, n_detect = 0;

  reset_block dut (.clk(clk), .por(por), .shr(shr), .seq_rst(seq_rst));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Present one bit and clock it in with a falling edge.
  task automatic send(input logic v);
    shr = v;
    #5;
    check(seq_rst == (v && ref_run == 3), $sformatf("seq_rst run=%0d bit=%0d", ref_run, v));
    if (seq_rst) n_detect++;
    clk = 1'b0;
    ref_run = v ? ((ref_run < 4) ? ref_run + 1 : 4) : 0;
    #5 clk = 1'b1;
    #5;
  endtask

  initial begin
    #1 por = 1'b1;
    #20 por = 1'b0;
    // exactly the reset sequence, then a data bit
    repeat (4) send(1'b1);
    send(1'b0);
    // three ones are not enough
    repeat (3) send(1'b1);
    send(1'b0);
    // a long run asserts only once
    repeat (7) send(1'b1);
    // por in the middle of a run clears the count
    send(1'b0);
    repeat (3) send(1'b1);
    por = 1'b1; #5 por = 1'b0; ref_run = 0;
    send(1'b1);
    check(n_detect == 2, "number of detections in directed part");
    // random stream
    for (int i = 0; i < 2000; i++)
      send(($urandom % 10) < 7);
    check(n_detect > 30, "random stream produced detections");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
