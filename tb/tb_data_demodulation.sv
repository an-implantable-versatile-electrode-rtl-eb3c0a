`timescale 1ns/1ps
// tb_data_demodulation - self-checking test of the demodulator model. Sends
// random bits as PWM low pulses on vin (250 ns for '0', 1.5 us for '1',
// one bit every 2 us, the fastest rate the chip accepts) and checks for
// every bit that clk falls with vin, stays low for the 800 ns monostable
// time and that shr then holds the bit. Also checks that nothing fires
// while power-on reset is active.
module tb_data_demodulation;
  logic vin = 1'b1, por = 1'b0, clk, shr;
  int checks = 0, failures = 0, ones = 0, zeros = 0;

  data_demodulation #(.T_MONO_NS(800.0)) dut (.vin(vin), .por(por), .clk(clk), .shr(shr));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send(input logic v);
    vin = 1'b0;
    #1   check(clk == 1'b0, "clk falls with vin");
    #248;
    if (!v) vin = 1'b1;
    #550 check(clk == 1'b0, "clk still low just before 800 ns");
    #2   check(clk == 1'b1, "clk back high just after 800 ns");
    check(shr == v, $sformatf("shr carries bit %0d", v));
    if (v) ones++; else zeros++;
    #699 vin = 1'b1;
    #500;
  endtask

  initial begin
    #1 por = 1'b1;
    #10;
    check(shr == 1'b0 && clk == 1'b1, "reset state");
    // a vin pulse during reset does not fire the monostable
    vin = 1'b0;
    #100 check(clk == 1'b1, "no clock during reset");
    vin = 1'b1;
    #100 por = 1'b0;
    #1000;
    for (int i = 0; i < 500; i++)
      send(1'($urandom % 2));
    check(ones > 100 && zeros > 100, "both bit values exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
