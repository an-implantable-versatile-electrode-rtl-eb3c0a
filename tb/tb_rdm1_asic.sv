`timescale 1ns/1ps
// tb_rdm1_asic - end-to-end test of the electrode-driving chip at its
// default parameters (13 electrodes, 800 ns monostable, 5 uA anodic bias).
//
// The test plays the role of the hub. It powers the chip up, then sends
// stimulation cycles over vin exactly as they travel on the wire: a 32-bit
// control word of PWM low pulses (250 ns for '0', 1.5 us for '1', one bit
// per 2 us) and four 250 ns timing pulses marking the start and end of each
// stimulus phase, while switching the stimulus current i_in_ua on during
// the phases. In the middle of every phase it compares all 13 electrode
// currents with values worked out here from the pattern, and at every
// timing pulse it checks that the mode switches on that very edge.
//
// First comes the power-up example (El0 cathode, El12 anode), then the
// four interleaved patterns (a)-(d) of the chip's published
// measurements, with their pulse widths, interphase delays, input currents
// and expected electrode currents (pattern (c) has no cathode and must be
// rejected). Then random patterns, words with both switches of an
// electrode set or without anodes, a word abandoned half way by a new
// reset sequence, stray pulses between cycles and a power cycle. Each
// mechanism is counted and must occur at least once.
module tb_rdm1_asic;
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
  // mechanism counters
  int n_por = 0, n_word = 0, n_phase1 = 0, n_ipd = 0, n_phase2 = 0, n_discharge = 0;
  int n_err_nocath = 0, n_err_noanod = 0, n_err_both = 0, n_restart = 0, n_stray = 0;
  int n_multi = 0, n_table = 0;

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

  // Wait a number of nanoseconds given at run time.
  task automatic wait_ns(input int unsigned n);
    repeat (n / 50) #50;
    repeat (n % 50) #1;
  endtask

  // One bit on the wire, 2 us long.
  task automatic send_bit(input logic v);
    vin = 1'b0;
    if (v) #1500; else #250;
    vin = 1'b1;
    if (v) #500; else #1750;
  endtask

  // A timing pulse: a '0' bit whose falling edge must switch the mode.
  task automatic timing_pulse(input mode_e from_mode, input mode_e to_mode, input int unsigned hold_us);
    check(u == from_mode, $sformatf("mode %b before timing pulse", from_mode));
    vin = 1'b0;
    #2;
    check(u == to_mode, $sformatf("mode %b right at the timing pulse", to_mode));
    #248 vin = 1'b1;
    wait_ns(hold_us * 1000 - 250);
  endtask

  task automatic expect_phase(input logic [N_EL-1:0] cath, input logic [N_EL-1:0] anod,
                              input real iin, input real exp_c, input real exp_a, input string name);
    for (int k = 0; k < N_EL; k++) begin
      real e;
      e = cath[k] ? -exp_c : (anod[k] ? exp_a : 0.0);
      check(near(i_el_ua[k], e), $sformatf("%s electrode %0d: %f uA, expected %f", name, k, i_el_ua[k], e));
    end
    check(!short_fault, {name, ": no short"});
  endtask

  function automatic int popcount(input logic [N_EL-1:0] m);
    int n = 0;
    for (int k = 0; k < N_EL; k++) n += int'(m[k]);
    return n;
  endfunction

  // Full stimulation cycle. cath/anod define the word; exp_* are the
  // electrode currents expected in phase 1 (phase 2 swaps the roles).
  task automatic stim_cycle(input logic [N_EL-1:0] cath, input logic [N_EL-1:0] anod,
                            input int unsigned width_us, input int unsigned ipd_us,
                            input real iin1, input real iin2, input string name);
    logic [NB-1:0] w;
    logic bad;
    real s1, s2, c1, a1, c2, a2;
    int na, nc;
    for (int k = 0; k < N_EL; k++) begin
      w[2*k]   = cath[k];
      w[2*k+1] = anod[k];
    end
    na  = popcount(anod);
    nc  = popcount(cath);
    bad = (cath & anod) != '0 || nc == 0 || na == 0;
    // expected currents, phase 1 and phase 2 (roles swapped)
    s1 = bad ? 0.0 : iin1 - 5.0 * na;
    s2 = bad ? 0.0 : iin2 - 5.0 * nc;
    c1 = bad ? 0.0 : s1 / nc;  a1 = bad ? 0.0 : s1 / na;
    c2 = bad ? 0.0 : s2 / na;  a2 = bad ? 0.0 : s2 / nc;
    repeat (4) send_bit(1'b1);
    for (int i = 0; i < NB; i++) send_bit(w[i]);
    send_bit(1'b0);
    send_bit(1'b0);
    n_word++;
    check(u == MODE_RX && v_c == '1 && v_a == '0, {name, ": electrodes at reference before stimulation"});
    check(err == bad, {name, ": error check"});
    if (bad) begin
      if ((cath & anod) != '0) n_err_both++;
      else if (nc == 0) n_err_nocath++;
      else n_err_noanod++;
    end
    if (na > 1 || nc > 1) n_multi++;
    // first phase
    i_in_ua = iin1;
    timing_pulse(MODE_RX, MODE_PH1, width_us / 2);
    expect_phase(bad ? '0 : cath, bad ? '0 : anod, iin1, c1, a1, {name, " phase 1"});
    n_phase1++;
    wait_ns(width_us * 500);
    // interphase delay: electrodes floating
    timing_pulse(MODE_PH1, MODE_IPD, ipd_us / 2);
    i_in_ua = 0.0;
    check(v_c == '0 && v_a == '0, {name, ": interphase, all switches open"});
    for (int k = 0; k < N_EL; k++) check(near(i_el_ua[k], 0.0), {name, ": no current in interphase"});
    n_ipd++;
    wait_ns(ipd_us * 500 - 20);
    i_in_ua = iin2;
    #20;
    // second phase: roles reversed
    timing_pulse(MODE_IPD, MODE_PH2, width_us / 2);
    expect_phase(bad ? '0 : anod, bad ? '0 : cath, iin2, c2, a2, {name, " phase 2"});
    n_phase2++;
    wait_ns(width_us * 500);
    // end: all electrodes to the reference
    timing_pulse(MODE_PH2, MODE_RX, 20);
    i_in_ua = 0.0;
    check(v_c == '1 && v_a == '0, {name, ": discharge after second phase"});
    n_discharge++;
  endtask

  function automatic logic [N_EL-1:0] mask(input int list[]);
    logic [N_EL-1:0] m = '0;
    m = '0;
    foreach (list[i]) m[list[i]] = 1'b1;
    return m;
  endfunction

  task automatic power_up();
    vdd_ok = 1'b0;
    vin    = 1'b1;
    #5000;
    vdd_ok = 1'b1;
    #2 check(dut.por == 1'b1, "power-on reset active");
    #5000;
    check(u == MODE_RX && v_c == '1 && v_a == '0 && !err, "state after power-on reset");
    n_por++;
  endtask

  // Published anode / cathode groups.
  int a_cath[] = '{1, 2};
  int a_anod[] = '{0, 3, 5, 7};
  int b_cath[] = '{0, 2, 4};
  int b_anod[] = '{1, 3, 5};
  int c_anod[] = '{0, 2, 4};
  int d_cath[] = '{2, 4, 5, 9, 10, 12};
  int d_anod[] = '{1, 3, 6, 7, 8, 11};

  initial begin
    power_up();
    // the power-up example: El0 cathode, El12 anode, El1-El11 unused
    stim_cycle(13'b0_0000_0000_0001, 13'b1_0000_0000_0000, 250, 100, 505.0, 505.0, "El0/El12 example");
    // interleaved patterns (a)-(d): per-electrode currents as published
    stim_cycle(mask(a_cath), mask(a_anod), 300, 100, 820.0, 810.0, "pattern a");
    stim_cycle(mask(b_cath), mask(b_anod), 250, 150, 765.0, 765.0, "pattern b");
    stim_cycle('0,           mask(c_anod), 250,  20, 780.0, 780.0, "pattern c");
    stim_cycle(mask(d_cath), mask(d_anod), 200,  20, 780.0, 780.0, "pattern d");
    n_table = 4;
    // the published figures for the same patterns
    begin
      logic [N_EL-1:0] c, a;
      c = mask(a_cath); a = mask(a_anod);
      check(near((820.0 - 5.0 * popcount(a)) / popcount(c), 400.0) &&
            near((820.0 - 5.0 * popcount(a)) / popcount(a), 200.0), "pattern a arithmetic");
    end
    // a word abandoned by a new reset sequence
    repeat (4) send_bit(1'b1);
    repeat (9) send_bit(1'b0);
    send_bit(1'b1);
    send_bit(1'b0);
    n_restart++;
    stim_cycle(13'b0000000000001, 13'b1000000000000, 100, 50, 1005.0, 1005.0, "after restart");
    // stray pulses between cycles are ignored
    repeat (3) begin
      send_bit(1'b0);
      check(u == MODE_RX && v_c == '1 && v_a == '0, "stray pulse ignored");
      n_stray++;
    end
    // rejected words
    stim_cycle(13'b0000000000011, 13'b0000000000010, 50, 20, 500.0, 500.0, "both switches");
    stim_cycle(13'b0000000010100, '0,                50, 20, 500.0, 500.0, "no anode");
    // random patterns
    for (int t = 0; t < 40; t++) begin
      logic [N_EL-1:0] c, a;
      for (int k = 0; k < N_EL; k++) begin
        int r;
        r = int'($urandom % 3);
        c[k] = (r == 0);
        a[k] = (r == 1);
      end
      if (c == '0) c[$urandom % N_EL] = 1'b1;
      a &= ~c;
      if (a == '0) a = ~c;
      stim_cycle(c, a, 20 + $urandom % 300, 10 + $urandom % 100,
                 real'(100 + $urandom % 900), real'(100 + $urandom % 900), $sformatf("random %0d", t));
    end
    // power cycle in the middle of a word, then a normal cycle
    repeat (4) send_bit(1'b1);
    repeat (5) send_bit(1'b0);
    power_up();
    stim_cycle(mask(b_cath), mask(b_anod), 250, 150, 765.0, 765.0, "after power cycle");

    $display("mechanisms: por=%0d words=%0d ph1=%0d ipd=%0d ph2=%0d discharge=%0d",
             n_por, n_word, n_phase1, n_ipd, n_phase2, n_discharge);
    $display("            err_nocathode=%0d err_noanode=%0d err_both=%0d restart=%0d stray=%0d multi=%0d",
             n_err_nocath, n_err_noanod, n_err_both, n_restart, n_stray, n_multi);
    check(n_por >= 2, "power-on reset happened");
    check(n_word > 0 && n_phase1 > 0 && n_ipd > 0 && n_phase2 > 0 && n_discharge > 0, "all modes visited");
    check(n_err_nocath > 0, "no-cathode rejection happened");
    check(n_err_noanod > 0, "no-anode rejection happened");
    check(n_err_both > 0, "both-switches rejection happened");
    check(n_restart > 0, "reset sequence restart happened");
    check(n_stray > 0, "stray pulses happened");
    check(n_multi > 0 && n_table == 4, "multi-electrode patterns happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
