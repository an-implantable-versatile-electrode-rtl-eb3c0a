`timescale 1ns/1ps
// tb_rdm1_workloads - runs the chip, at its default parameters, through
// the stimulation settings it was characterised with, and checks the
// electrode currents and the cycle timing:
//   * one electrode pair, biphasic, at 100 uA, 500 uA and 1 mA with
//     250 us phases, the roles of anode and cathode swapping in phase 2;
//   * the full cycle used for the power estimate: two 250 us phases and a
//     100 us interphase delay;
//   * the extreme pattern of twelve anodes and one cathode, where the
//     input current must carry 12 x 5 uA of anodic bias on top of the
//     400 uA .. 1 mA stimulus;
//   * repetition at 100 pulses per second, the highest rate the chip is
//     meant for: every cycle, word included, must fit in its 10 ms slot.
module tb_rdm1_workloads;
  import rdm_pkg::*;
  localparam int N_EL = 13;
  localparam int NB   = 2 * N_EL;

  logic vdd_ok = 1'b0, vin = 1'b1;
  real  i_in_ua = 0.0;
  real  i_el_ua [N_EL];
  real  i_stim_ua;
  logic [N_EL-1:0] v_c, v_a;
  mode_e u;
  logic err, short_fault;
  int checks = 0, failures = 0;

  rdm1_asic dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic near(input real a, input real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  task automatic wait_ns(input int unsigned n);
    repeat (n / 50) #50;
    repeat (n % 50) #1;
  endtask

  task automatic send_bit(input logic v);
    vin = 1'b0;
    if (v) #1500; else #250;
    vin = 1'b1;
    if (v) #500; else #1750;
  endtask

  task automatic timing_pulse(input mode_e to_mode);
    vin = 1'b0;
    #2 check(u == to_mode, $sformatf("mode %b at timing pulse", to_mode));
    #248 vin = 1'b1;
  endtask

  // Electrode k is expected to carry +i_a (anode), -i_c (cathode) or 0.
  task automatic expect_el(input logic [N_EL-1:0] cath, input logic [N_EL-1:0] anod,
                           input real i_c, input real i_a, input string name);
    for (int k = 0; k < N_EL; k++) begin
      real e;
      e = cath[k] ? -i_c : (anod[k] ? i_a : 0.0);
      check(near(i_el_ua[k], e), $sformatf("%s electrode %0d: %f uA, expected %f", name, k, i_el_ua[k], e));
    end
  endtask

  // One biphasic cycle; returns its duration in ns. The input currents
  // are those the hub must inject: stimulus plus 5 uA per active anode.
  task automatic cycle(input logic [N_EL-1:0] cath, input logic [N_EL-1:0] anod,
                       input real istim, input int unsigned width_us, input int unsigned ipd_us,
                       input real exp_c1, input real exp_a1, input real exp_c2, input real exp_a2,
                       input string name, output longint dur_ns);
    longint t0;
    int na, nc;
    t0 = longint'($time);
    na = 0; nc = 0;
    for (int k = 0; k < N_EL; k++) begin
      na += int'(anod[k]);
      nc += int'(cath[k]);
    end
    repeat (4) send_bit(1'b1);
    for (int k = 0; k < N_EL; k++) begin
      send_bit(cath[k]);
      send_bit(anod[k]);
    end
    send_bit(1'b0);
    send_bit(1'b0);
    check(!err, {name, ": word accepted"});
    i_in_ua = istim + 5.0 * na;
    timing_pulse(MODE_PH1);
    wait_ns(width_us * 500);
    expect_el(cath, anod, exp_c1, exp_a1, {name, " phase 1"});
    wait_ns(width_us * 500 - 250);
    timing_pulse(MODE_IPD);
    i_in_ua = 0.0;
    wait_ns(ipd_us * 1000 - 250);
    i_in_ua = istim + 5.0 * nc;   // anode count of phase 2 = cathodes of phase 1
    timing_pulse(MODE_PH2);
    wait_ns(width_us * 500);
    expect_el(anod, cath, exp_c2, exp_a2, {name, " phase 2"});
    wait_ns(width_us * 500 - 250);
    timing_pulse(MODE_RX);
    i_in_ua = 0.0;
    check(v_c == '1 && v_a == '0, {name, ": electrodes back at reference"});
    dur_ns = longint'($time) - t0;
  endtask

  initial begin
    longint d;
    logic [N_EL-1:0] one_c, twelve_a;
    #5000 vdd_ok = 1'b1;
    #5000;
    // single pair, three amplitudes, 250 us phases
    cycle(13'b1, 13'b10,  100.0, 250, 100,  100.0,  100.0,  100.0,  100.0, "pair 100 uA", d);
    cycle(13'b1, 13'b10,  500.0, 250, 100,  500.0,  500.0,  500.0,  500.0, "pair 500 uA", d);
    cycle(13'b1, 13'b10, 1000.0, 250, 100, 1000.0, 1000.0, 1000.0, 1000.0, "pair 1 mA", d);
    // the cycle of the power estimate: 250 + 100 + 250 us plus the word
    check(d >= 600_000 && d < 600_000 + 40 * 2000, $sformatf("full cycle lasts %0d ns", d));
    // twelve anodes, one cathode, at both ends of the practical range
    one_c    = 13'b1_0000_0000_0000;
    twelve_a = ~one_c;
    cycle(one_c, twelve_a,  400.0, 250, 100,  400.0,  400.0 / 12,  400.0 / 12,  400.0, "12 anodes 400 uA", d);
    cycle(one_c, twelve_a, 1000.0, 250, 100, 1000.0, 1000.0 / 12, 1000.0 / 12, 1000.0, "12 anodes 1 mA", d);
    // 100 pulses per second: ten cycles, each in its own 10 ms slot
    for (int i = 0; i < 10; i++) begin
      cycle(13'b100, 13'b1000, 500.0, 250, 100, 500.0, 500.0, 500.0, 500.0, "100 pps", d);
      check(d < 10_000_000, "cycle fits in a 10 ms period");
      wait_ns(32'(10_000_000 - d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
