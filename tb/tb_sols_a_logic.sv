// Self-checking testbench for sols_a_logic (MUX_2 of the encoder).
// Applies all eight combinations of mode, b_prev and x and compares a_pre with
// the selection rule: b_prev for FM0, x for Manchester. Also checks that, once
// inverted, the result is A(t) = ~B(t-1) in FM0 and ~X in Manchester.
module tb_sols_a_logic;
  import sols_pkg::*;

  mode_e mode;
  logic  b_prev, x, a_pre;
  int    checks = 0, failures = 0;

  sols_a_logic dut (.mode(mode), .b_prev(b_prev), .x(x), .a_pre(a_pre));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_inv;
    for (int i = 0; i < 8; i++) begin
      mode   = mode_e'(i[2]);
      b_prev = i[1];
      x      = i[0];
      #1;
      // After the shared inverter: A(t) = ~B(t-1) for FM0, ~X for Manchester.
      exp_inv = (i[2] == 1'b0) ? !i[1] : !i[0];
      checks++;
      if (~a_pre !== exp_inv) begin
        failures++;
        $display("FAIL mode=%0d b_prev=%0b x=%0b a_pre=%0b", i[2], i[1], i[0], a_pre);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
