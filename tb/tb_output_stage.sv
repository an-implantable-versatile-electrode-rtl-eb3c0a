`timescale 1ns/1ps
// tb_output_stage - self-checking test of the output stage model against
// the measured interleaved-stimulation settings of the chip: for each
// pattern the input current, the electrode roles and the expected
// per-electrode currents (both phases) are those of the published table
// (400/200 uA, 250/250 uA, none, 125/125 uA). Also checks the discharge
// setting, an open setting and the short-circuit flag.
module tb_output_stage;
  localparam int N_EL = 13;
  logic [N_EL-1:0] v_c, v_a;
  real i_in_ua, i_el_ua [N_EL], i_stim_ua;
  logic short_fault;
  int checks = 0, failures = 0;

  output_stage #(.N_EL(N_EL), .I_BIAS_UA(5.0)) dut (.*);

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

  // Apply a setting and compare every electrode with the expected current.
  task automatic expect_currents(input logic [N_EL-1:0] c, input logic [N_EL-1:0] a,
                                 input real iin, input real i_cath, input real i_anod,
                                 input string name);
    v_c = c; v_a = a; i_in_ua = iin;
    #10;
    for (int k = 0; k < N_EL; k++) begin
      real exp_i;
      exp_i = c[k] ? -i_cath : (a[k] ? i_anod : 0.0);
      check(near(i_el_ua[k], exp_i),
            $sformatf("%s: electrode %0d carries %f uA, expected %f", name, k, i_el_ua[k], exp_i));
    end
    check(!short_fault, {name, ": no short"});
  endtask

  initial begin
    // (a) cathodes 1,2; anodes 0,3,5,7; 820 uA then 810 uA reversed
    expect_currents(13'b0_0000_0000_0110, 13'b0_0000_1010_1001, 820.0, 400.0, 200.0, "a phase 1");
    expect_currents(13'b0_0000_1010_1001, 13'b0_0000_0000_0110, 810.0, 200.0, 400.0, "a phase 2");
    // (b) cathodes 0,2,4; anodes 1,3,5; 765 uA
    expect_currents(13'b0_0000_0001_0101, 13'b0_0000_0010_1010, 765.0, 250.0, 250.0, "b phase 1");
    expect_currents(13'b0_0000_0010_1010, 13'b0_0000_0001_0101, 765.0, 250.0, 250.0, "b phase 2");
    // (c) no cathode: nothing flows
    expect_currents(13'b0, 13'b0_0000_0001_0101, 780.0, 0.0, 0.0, "c");
    // (d) cathodes 2,4,5,9,10,12; anodes 1,3,6,7,8,11; 780 uA
    expect_currents(13'b1_0110_0011_0100, 13'b0_1001_1100_1010, 780.0, 125.0, 125.0, "d phase 1");
    expect_currents(13'b0_1001_1100_1010, 13'b1_0110_0011_0100, 780.0, 125.0, 125.0, "d phase 2");
    // discharge: every electrode at the reference, no stimulus current
    expect_currents('1, '0, 500.0, 0.0, 0.0, "discharge");
    check(near(i_stim_ua, 0.0), "discharge carries no stimulus");
    // all open
    expect_currents('0, '0, 500.0, 0.0, 0.0, "open");
    // one anode, one cathode, 1 mA: the bias of one anode is taken from Iin
    expect_currents(13'b1, 13'b10, 1005.0, 1000.0, 1000.0, "1 mA pair");
    check(near(i_stim_ua, 1000.0), "stimulus current is Iin less the bias");
    // both switches of an electrode closed
    v_c = 13'b11; v_a = 13'b110; i_in_ua = 500.0;
    #10 check(short_fault && near(i_stim_ua, 0.0), "short detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
