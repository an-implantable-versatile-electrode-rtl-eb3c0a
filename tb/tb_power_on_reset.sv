`timescale 1ns/1ps
// tb_power_on_reset - self-checking test of the power-on-reset model: the
// reset pulse must start when the supply comes up, last T_POR_NS (checked
// just before and just after its end) and repeat after a supply drop.
module tb_power_on_reset;
  logic vdd_ok = 1'b0, por;
  int checks = 0, failures = 0;

  power_on_reset #(.T_POR_NS(1000.0)) dut (.vdd_ok(vdd_ok), .por(por));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000 check(por == 1'b0, "unpowered: no reset pulse");
    for (int i = 0; i < 5; i++) begin
      vdd_ok = 1'b1;
      #1   check(por == 1'b1, "reset starts with the supply");
      #997 check(por == 1'b1, "reset still active before 1 us");
      #4   check(por == 1'b0, "reset released after 1 us");
      #5000 check(por == 1'b0, "no reset while powered");
      vdd_ok = 1'b0;
      #3000 check(por == 1'b0, "supply down");
    end
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
