// Self-checking test of switching_function: all gate combinations with both
// current signs against the truth table of an ideal leg with freewheeling
// diodes.
module tb_switching_function;
  import hil_pkg::*;
  logic gate_up, gate_dn, k, shoot_through;
  fx_t  i_in;
  int checks = 0, failures = 0;

  switching_function dut (.gate_up, .gate_dn, .i_in, .k, .shoot_through);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 4; g++) begin
      for (int s = 0; s < 2; s++) begin
        logic exp_k, exp_st;
        gate_up = g[1];
        gate_dn = g[0];
        i_in = (s == 0) ? to_fx(12.5) : to_fx(-3.25);
        #1;
        exp_st = (g == 3);
        if (g == 2 || g == 3) exp_k = 1;
        else if (g == 1)      exp_k = 0;
        else                  exp_k = (s == 0);
        checks++;
        if (k !== exp_k || shoot_through !== exp_st) begin
          failures++;
          $display("FAIL: up=%0b dn=%0b i<0=%0d k=%0b st=%0b", gate_up, gate_dn, s, k, shoot_through);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
