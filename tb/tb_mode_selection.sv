`timescale 1ns/1ps
// tb_mode_selection - self-checking test of the sequencer. The Reg1 contents
// b are driven directly. For each random word (valid, or broken by one of
// the three error rules) the test sends the reset sequence and counts
// falling edges: loading must last exactly 26 edges, the check edge must
// raise e only for a bad word, and the next four edges must step U1U0
// through 01, 11, 10, 00 while issuing the matching Reg2 operations.
// Later edges must be ignored until the next reset sequence, which must
// also restart the block from the middle of a stimulation cycle.
module tb_mode_selection;
  import rdm_pkg::*;
  localparam int N_EL = 13;
  localparam int NB   = 2 * N_EL;

  logic clk = 1'b1, por = 1'b0, seq_rst = 1'b0;
  logic [NB-1:0] b = '0;
  logic load_en, e, err;
  reg2_op_e reg2_op;
  mode_e u;
  int checks = 0, failures = 0;
  int n_bad = 0, n_good = 0, n_restart = 0;

  mode_selection #(.N_EL(N_EL)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic edge_();
    #5 clk = 1'b0;
    #5 clk = 1'b1;
    #5;
  endtask

  function automatic logic bad_word(input logic [NB-1:0] w);
    logic any_c, any_a, both;
    any_c = 1'b0;
    any_a = 1'b0;
    both  = 1'b0;
    for (int k = 0; k < N_EL; k++) begin
      any_c |= w[2*k];
      any_a |= w[2*k+1];
      both  |= w[2*k] & w[2*k+1];
    end
    return both || !any_c || !any_a;
  endfunction

  function automatic logic [NB-1:0] random_word(input int kind);
    logic [NB-1:0] w;
    w = '0;
    for (int k = 0; k < N_EL; k++) begin
      int r;
      r = int'($urandom % 3);
      if (r == 0) w[2*k] = 1'b1;
      if (r == 1) w[2*k+1] = 1'b1;
    end
    if (kind == 1) w[2*($urandom % N_EL) +: 2] = 2'b11;              // both switches
    if (kind == 2) for (int k = 0; k < N_EL; k++) w[2*k] = 1'b0;      // no cathode
    if (kind == 3) for (int k = 0; k < N_EL; k++) w[2*k+1] = 1'b0;    // no anode
    return w;
  endfunction

  initial begin
    #1 por = 1'b1;
    #5;
    check(u == MODE_RX && !load_en && !err, "power-on state");
    por = 1'b0;
    for (int t = 0; t < 300; t++) begin
      logic exp_bad;
      int cycles;
      b = random_word((($urandom % 2) != 0) ? 0 : int'($urandom % 4));
      exp_bad = bad_word(b);
      // reset sequence (its last '1')
      seq_rst = 1'b1;
      #1 check(reg2_op == R2_DISCHARGE, "reset sequence discharges the electrodes");
      edge_();
      seq_rst = 1'b0;
      #1;
      cycles = 0;
      while (load_en && cycles < 100) begin
        check(u == MODE_RX && reg2_op == R2_HOLD && !e, "reception while loading");
        edge_();
        cycles++;
      end
      check(cycles == NB, $sformatf("loading lasted %0d edges", cycles));
      check(e == exp_bad, "error check result");
      if (exp_bad) n_bad++; else n_good++;
      edge_();
      check(err == exp_bad && !load_en && !e, "error flag");
      check(reg2_op == R2_FORWARD && u == MODE_RX, "load first phase");
      edge_();
      check(u == MODE_PH1 && reg2_op == R2_OPEN, "first phase");
      if (t % 10 == 5) begin
        // reset sequence in the middle of the first phase
        seq_rst = 1'b1;
        #1 check(reg2_op == R2_DISCHARGE, "restart discharges");
        edge_();
        seq_rst = 1'b0;
        #1;
        check(u == MODE_RX && load_en, "restart from first phase");
        n_restart++;
        repeat (NB + 2) edge_();
        check(u == MODE_PH1, "restarted cycle reaches first phase");
      end
      edge_();
      check(u == MODE_IPD && reg2_op == R2_REVERSE, "interphase delay");
      edge_();
      check(u == MODE_PH2 && reg2_op == R2_DISCHARGE, "second phase");
      edge_();
      check(u == MODE_RX && reg2_op == R2_HOLD, "back to reception");
      repeat ($urandom % 4) begin
        edge_();
        check(u == MODE_RX && reg2_op == R2_HOLD && !load_en, "idle pulses ignored");
      end
    end
    $display("good=%0d bad=%0d restarts=%0d", n_good, n_bad, n_restart);
    check(n_bad > 20 && n_good > 20 && n_restart > 10, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
