// Logic for B(t)/X: the XNOR of the data bit and the stored state.
//
// FM0 needs B(t) = X xor B(t-1) in the second half of a bit window, and
// Manchester needs X there. Because the state flip-flop is held cleared in
// Manchester mode (B(t-1) = 0), one gate covers both: X xor 0 = X. The gate
// is an XNOR rather than an XOR so that its output passes through the same
// inverter as the A(t)/~X path, which keeps the delays of the two inputs of
// MUX_1 alike and avoids a glitch when MUX_1 switches.
//
// Interface: purely combinational. b_pre = ~(x ^ b_prev); inverted, it is
// B(t) in FM0 and X in Manchester.
module sols_b_logic (
  input  logic x,       // data bit X
  input  logic b_prev,  // B(t-1), the state flip-flop output (0 in Manchester)
  output logic b_pre    // XNOR output, operand of the shared inverter
);

  always_comb b_pre = ~(x ^ b_prev);

endmodule
