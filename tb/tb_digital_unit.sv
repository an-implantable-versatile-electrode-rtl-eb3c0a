`timescale 1ns/1ps
// tb_digital_unit - self-checking test of the complete digital unit at
// bit level. The clock and data are driven as the demodulator delivers
// them: clk falls at the start of each received pulse and rises later,
// when shr takes the new bit. Each stimulation cycle is the 32-bit word
// ('1111', 26 switch bits, '00') plus four timing pulses. After every pulse
// the mode and the switch controls are compared with values worked out
// here from the word: forward pattern in the first phase, all open in the
// interphase delay, swapped pattern in the second phase, all cathodic
// switches closed afterwards; all open in both phases for a rejected word.
module tb_digital_unit;
  import rdm_pkg::*;
  localparam int N_EL = 13;
  localparam int NB   = 2 * N_EL;

  logic clk = 1'b1, por = 1'b0, shr = 1'b0;
  logic [N_EL-1:0] v_c, v_a;
  mode_e u;
  logic err;
  int checks = 0, failures = 0;
  int n_good = 0, n_bad = 0, n_restart = 0;

  digital_unit #(.N_EL(N_EL)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One received pulse carrying bit v.
  task automatic pulse(input logic v);
    clk = 1'b0;
    #400;
    clk = 1'b1;
    shr = v;
    #1600;
  endtask

  function automatic logic [NB-1:0] random_word(input int kind);
    logic [NB-1:0] w;
    w = '0;
    for (int k = 0; k < N_EL; k++) begin
      int r;
      r = int'($urandom % 3);
      if (r == 0) w[2*k] = 1'b1;
      if (r == 1) w[2*k+1] = 1'b1;
    end
    if (kind == 1) w[2*($urandom % N_EL) +: 2] = 2'b11;
    if (kind == 2) for (int k = 0; k < N_EL; k++) w[2*k] = 1'b0;
    if (kind == 3) for (int k = 0; k < N_EL; k++) w[2*k+1] = 1'b0;
    // A run of four '1's inside the word is itself a reset sequence; such
    // words are tested separately.
    for (int i = 0; i + 3 < NB; i++)
      if (w[i +: 4] == 4'hF) w[i+1] = 1'b0;
    return w;
  endfunction

  task automatic run_cycle(input logic [NB-1:0] w);
    logic [N_EL-1:0] c, a;
    logic bad;
    logic any_c, any_a, both;
    any_c = 1'b0; any_a = 1'b0; both = 1'b0;
    for (int k = 0; k < N_EL; k++) begin
      c[k] = w[2*k];
      a[k] = w[2*k+1];
      any_c |= c[k];
      any_a |= a[k];
      both  |= c[k] & a[k];
    end
    bad = both || !any_c || !any_a;
    if (bad) begin c = '0; a = '0; n_bad++; end else n_good++;
    repeat (4) pulse(1'b1);
    for (int i = 0; i < NB; i++) begin
      pulse(w[i]);
      check(u == MODE_RX && v_c == '1 && v_a == '0, "reception: electrodes held at reference");
    end
    pulse(1'b0);
    pulse(1'b0);
    check(u == MODE_RX, "still receiving after the word");
    pulse(1'b0);   // the word's second dummy bit is checked on this edge
    check(err == bad, "error flag");
    check(u == MODE_PH1 && v_c == c && v_a == a, "first phase pattern");
    pulse(1'b0);
    check(u == MODE_IPD && v_c == '0 && v_a == '0, "interphase: all open");
    pulse(1'b0);
    check(u == MODE_PH2 && v_c == a && v_a == c, "second phase: reversed");
    pulse(1'b0);
    check(u == MODE_RX && v_c == '1 && v_a == '0, "after second phase: discharge");
  endtask

  initial begin
    #1 por = 1'b1;
    #100;
    check(u == MODE_RX && v_c == '1 && v_a == '0, "power-on state");
    por = 1'b0;
    // pulses before any reset sequence change nothing
    repeat (5) pulse(1'b0);
    check(u == MODE_RX && v_c == '1, "ignored before a reset sequence");
    // a word cut short by a new reset sequence is abandoned
    for (int t = 0; t < 10; t++) begin
      repeat (4) pulse(1'b1);
      repeat (1 + $urandom % 20) pulse(1'($urandom % 2));
      pulse(1'b0);
      run_cycle(random_word(0));
      n_restart++;
    end
    for (int t = 0; t < 150; t++) begin
      run_cycle(random_word((($urandom % 2) != 0) ? 0 : int'($urandom % 4)));
      repeat ($urandom % 3) begin
        pulse(1'b0);
        check(u == MODE_RX && v_c == '1 && v_a == '0, "idle pulses ignored");
      end
    end
    check(n_good > 20 && n_bad > 20, "valid and rejected words both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
