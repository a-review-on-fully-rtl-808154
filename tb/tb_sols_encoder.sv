// End-to-end testbench for sols_encoder, at its default (and only) size.
//
// The bit clock has a period of 10 time units; each bit window starts at a
// rising edge. X, mode and clr change 1 unit after the rising edge; the code
// is sampled in the middle of the high half (3 units) and of the low half
// (8 units) of the same cycle, so every check also checks that the code of a
// bit appears in the cycle in which the bit is applied.
//
// Expected values come from a reference model written the way a two-register
// FM0 encoder is usually described: registers A and B updated per bit by
// A(t) = ~B(t-1), B(t) = X ^ B(t-1), output A in the first half and B in the
// second; Manchester output is X xor CLK. On top of that the three FM0 rules
// are checked directly on the waveform (a transition at every bit boundary,
// a mid-bit transition for 0, none for 1), and the Manchester rule (1 is a
// low-to-high transition, 0 high-to-low).
//
// The stimulus runs: the five-bit example sequence 0,1,1,0,1 in FM0 and in
// Manchester, then random phases that switch mode and re-initialise with
// CLR. Counted mechanisms, each of which must occur: FM0 bits of value 0 and
// 1, Manchester bits of value 0 and 1, CLR initialisations, switches
// FM0 -> Manchester and Manchester -> FM0.
module tb_sols_encoder;
  import sols_pkg::*;

  logic  clk = 1'b1;
  logic  clr, x, code;
  mode_e mode;

  int checks = 0, failures = 0;
  int n_fm0_0 = 0, n_fm0_1 = 0, n_man_0 = 0, n_man_1 = 0;
  int n_init = 0, n_to_man = 0, n_to_fm0 = 0;

  // Reference model state: B(t-1) of a two-register FM0 encoder.
  logic ref_b;
  // Second-half code of the previous bit, for the FM0 boundary rule.
  logic prev_second;
  logic prev_was_fm0;

  sols_encoder dut (.clk(clk), .clr(clr), .mode(mode), .x(x), .code(code));

  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  // One bit window. Inputs are applied 1 unit after the rising edge that
  // opens the window; the caller is positioned exactly at that edge.
  task automatic send_bit(input mode_e m, input logic c, input logic b);
    logic first, second, exp_first, exp_second;
    mode_e prev_mode;
    prev_mode = mode;
    #1;
    if (prev_mode != m) begin
      if (m == MODE_MANCHESTER) n_to_man++;
      else                      n_to_fm0++;
    end
    mode = m;
    clr  = c;
    x    = b;
    #2 first  = code;   // CLK high: first half-bit
    #5 second = code;   // CLK low: second half-bit
    if (m == MODE_MANCHESTER) begin
      // X xor CLK: ~X while CLK is high, X while it is low.
      exp_first  = ~b;
      exp_second = b;
      check(first,  exp_first,  "Manchester first half");
      check(second, exp_second, "Manchester second half");
      // Rule: 1 = low-to-high, 0 = high-to-low.
      check(first ^ second, 1'b1, "Manchester mid-bit transition");
      check(second, b, "Manchester transition direction");
      if (b) n_man_1++; else n_man_0++;
      prev_was_fm0 = 1'b0;
    end else if (!c) begin
      exp_first  = ~ref_b;        // A(t)
      exp_second = b ^ ref_b;     // B(t)
      check(first,  exp_first,  "FM0 first half (A)");
      check(second, exp_second, "FM0 second half (B)");
      // FM0 rules 1 and 2: mid-bit transition for 0, none for 1.
      check(first ^ second, ~b, "FM0 mid-bit rule");
      // FM0 rule 3: the level changes at every bit boundary.
      if (prev_was_fm0) check(first, ~prev_second, "FM0 boundary rule");
      if (b) n_fm0_1++; else n_fm0_0++;
      prev_was_fm0 = 1'b1;
      prev_second  = second;
    end else begin
      // FM0 mode with CLR high: initialisation, code not used.
      n_init++;
      prev_was_fm0 = 1'b0;
    end
    // Reference state update at the rising edge closing the window.
    if (c) ref_b = 1'b0;
    else   ref_b = b ^ ref_b;
    #2;  // next rising edge
  endtask

  localparam logic [4:0] EXAMPLE = 5'b01101;  // 0,1,1,0,1 sent first to last

  initial begin
    mode = MODE_FM0;
    clr  = 1'b1;
    x    = 1'b0;
    ref_b = 1'b0;
    prev_second = 1'b0;
    prev_was_fm0 = 1'b0;
    @(posedge clk);
    // Initialise, then the example sequence in FM0.
    send_bit(MODE_FM0, 1'b1, 1'b0);
    for (int i = 4; i >= 0; i--) send_bit(MODE_FM0, 1'b0, EXAMPLE[i]);
    // The same sequence in Manchester (CLR held high).
    for (int i = 4; i >= 0; i--) send_bit(MODE_MANCHESTER, 1'b1, EXAMPLE[i]);
    // Random phases.
    for (int ph = 0; ph < 40; ph++) begin
      int len;
      len = 1 + $urandom_range(30);
      if ($urandom_range(1) == 0) begin
        if ($urandom_range(1) == 0) send_bit(MODE_FM0, 1'b1, 1'($urandom));
        for (int k = 0; k < len; k++) send_bit(MODE_FM0, 1'b0, 1'($urandom));
      end else begin
        for (int k = 0; k < len; k++) send_bit(MODE_MANCHESTER, 1'b1, 1'($urandom));
      end
    end
    $display("FM0 bits: %0d zeros, %0d ones; Manchester bits: %0d zeros, %0d ones",
             n_fm0_0, n_fm0_1, n_man_0, n_man_1);
    $display("CLR initialisations: %0d; switches to Manchester: %0d, to FM0: %0d",
             n_init, n_to_man, n_to_fm0);
    checks++; if (n_fm0_0  == 0) begin failures++; $display("FAIL no FM0 zero"); end
    checks++; if (n_fm0_1  == 0) begin failures++; $display("FAIL no FM0 one"); end
    checks++; if (n_man_0  == 0) begin failures++; $display("FAIL no Manchester zero"); end
    checks++; if (n_man_1  == 0) begin failures++; $display("FAIL no Manchester one"); end
    checks++; if (n_init   == 0) begin failures++; $display("FAIL no CLR initialisation"); end
    checks++; if (n_to_man == 0) begin failures++; $display("FAIL no switch to Manchester"); end
    checks++; if (n_to_fm0 == 0) begin failures++; $display("FAIL no switch to FM0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
