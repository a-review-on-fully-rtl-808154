// Self-checking testbench for sols_state_reg (DFFB).
// Drives random data for 200 cycles and checks that q equals the d sampled at
// the previous rising edge. Asserts clr at random moments, some in the middle
// of a cycle, and checks that q goes to 0 at once and stays 0 while clr is
// high (asynchronous clear), and that capture resumes after release.
module tb_sols_state_reg;
  logic clk = 1'b0, clr, d, q;
  logic model_q;
  int   checks = 0, failures = 0, clears = 0;

  sols_state_reg dut (.clk(clk), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b0;
    d   = 1'b1;
    #1 clr = 1'b1;
    #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL q not cleared"); end
    @(negedge clk);
    clr = 1'b0;
    model_q = 1'b0;
    for (int cyc = 0; cyc < 200; cyc++) begin
      d = 1'($urandom);
      @(posedge clk);
      model_q = d;
      #1;
      checks++;
      if (q !== model_q) begin
        failures++;
        $display("FAIL cycle %0d q=%0b expected %0b", cyc, q, model_q);
      end
      if ($urandom_range(9) == 0) begin
        // Asynchronous clear in the middle of the cycle.
        #2 clr = 1'b1;
        #1;
        clears++;
        checks++;
        if (q !== 1'b0) begin failures++; $display("FAIL async clear at cycle %0d", cyc); end
        d = 1'b1;
        @(posedge clk);
        #1;
        checks++;
        if (q !== 1'b0) begin failures++; $display("FAIL q captured while clr high"); end
        clr = 1'b0;
        model_q = 1'b0;
      end else begin
        @(negedge clk);
      end
    end
    checks++;
    if (clears == 0) begin failures++; $display("FAIL no clear exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
