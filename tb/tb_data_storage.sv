`timescale 1ns/1ps
// tb_data_storage - self-checking test of Reg1 (Gray-addressed serial
// loading) and Reg2 (switch register). Random 26-bit words are loaded one
// bit per falling edge; Reg1 must hold bit k of the stream in b[k]. Each
// Reg2 operation is then applied and the switch outputs compared with the
// pattern worked out here from the loaded word. Also checks the clear by
// the error output, the clear by the reset sequence and power-on reset.
module tb_data_storage;
  import rdm_pkg::*;
  localparam int N_EL = 13;
  localparam int NB   = 2 * N_EL;

  logic clk = 1'b1, por = 1'b0, seq_rst = 1'b0, load_en = 1'b0, err_clr = 1'b0, shr = 1'b0;
  reg2_op_e reg2_op = R2_HOLD;
  logic [NB-1:0] b;
  logic [N_EL-1:0] v_c, v_a, exp_c, exp_a;
  logic [NB-1:0] word;
  int checks = 0, failures = 0;

  data_storage #(.N_EL(N_EL)) dut (.*);

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

  task automatic apply(input reg2_op_e op);
    reg2_op = op;
    edge_();
    reg2_op = R2_HOLD;
  endtask

  initial begin
    #1 por = 1'b1;
    #11;
    check(v_c == '1 && v_a == '0 && b == '0, "power-on state");
    por = 1'b0;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NB; i++) word[i] = 1'($urandom);
      seq_rst = 1'b1; shr = 1'b1; edge_(); seq_rst = 1'b0;
      check(b == '0, "reset sequence clears Reg1");
      load_en = 1'b1;
      for (int i = 0; i < NB; i++) begin
        shr = word[i];
        edge_();
        check(b[i] == word[i] && (b >> (i + 1)) == '0, $sformatf("bit %0d loaded", i));
      end
      load_en = 1'b0;
      check(b == word, "Reg1 holds the word");
      // a further edge with loading off changes nothing
      shr = ~shr; edge_();
      check(b == word, "Reg1 holds after loading stops");
      for (int k = 0; k < N_EL; k++) begin
        exp_c[k] = word[2*k];
        exp_a[k] = word[2*k+1];
      end
      apply(R2_FORWARD);
      check(v_c == exp_c && v_a == exp_a, "forward pattern");
      apply(R2_HOLD);
      check(v_c == exp_c && v_a == exp_a, "hold");
      apply(R2_OPEN);
      check(v_c == '0 && v_a == '0, "all open");
      apply(R2_REVERSE);
      check(v_c == exp_a && v_a == exp_c, "reversed pattern");
      apply(R2_DISCHARGE);
      check(v_c == '1 && v_a == '0, "discharge");
      if (t % 4 == 0) begin
        err_clr = 1'b1; edge_(); err_clr = 1'b0;
        check(b == '0, "e clears Reg1");
        apply(R2_FORWARD);
        check(v_c == '0 && v_a == '0, "cleared word opens all switches");
      end
    end
    por = 1'b1; #1;
    check(b == '0 && v_c == '1 && v_a == '0, "asynchronous power-on reset");
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
