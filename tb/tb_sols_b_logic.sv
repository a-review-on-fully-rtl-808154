// Self-checking testbench for sols_b_logic (the XNOR of the encoder).
// Applies all four input combinations. Expected values come from the FM0
// transition table: after the shared inverter the output must be
// B(t) = X xor B(t-1); with B(t-1) = 0 (Manchester) it must be X itself.
module tb_sols_b_logic;
  logic x, b_prev, b_pre;
  int   checks = 0, failures = 0;

  sols_b_logic dut (.x(x), .b_prev(b_prev), .b_pre(b_pre));

  // B(t) for X = 0 / X = 1, indexed by B(t-1) (FM0 transition table).
  localparam logic [1:0] B_NEXT_X0 = 2'b10;  // B(t-1)=1 -> 1, B(t-1)=0 -> 0
  localparam logic [1:0] B_NEXT_X1 = 2'b01;  // B(t-1)=1 -> 0, B(t-1)=0 -> 1

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_b;
    for (int i = 0; i < 4; i++) begin
      b_prev = i[1];
      x      = i[0];
      #1;
      exp_b = x ? B_NEXT_X1[b_prev] : B_NEXT_X0[b_prev];
      checks++;
      if (~b_pre !== exp_b) begin
        failures++;
        $display("FAIL x=%0b b_prev=%0b b_pre=%0b", x, b_prev, b_pre);
      end
      if (b_prev == 1'b0) begin
        checks++;
        if (~b_pre !== x) begin
          failures++;
          $display("FAIL Manchester pass-through x=%0b b_pre=%0b", x, b_pre);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
