// Fully reused FM0/Manchester encoder (SOLS architecture, balanced timing).
//
// FM0 and Manchester both split each bit window in two halves. With CLK high
// in the first half and low in the second:
//   FM0:        code = CLK ? A(t) : B(t),  A(t) = ~B(t-1),  B(t) = X ^ B(t-1)
//   Manchester: code = CLK ? ~X   : X     (= X xor CLK)
// The encoder serves both with five components, all used in either mode:
//   MUX_2 (sols_a_logic)  chooses B(t-1) or X by mode,
//   XNOR  (sols_b_logic)  forms ~(X ^ B(t-1)),
//   MUX_1                 chooses between them with CLK itself as select,
//   one inverter          after MUX_1, shared by both paths,
//   DFFB  (sols_state_reg) the only state bit, fed from the inverter output
//                          (see the note at its instance on how D is formed).
// In Manchester mode CLR holds DFFB at 0, which turns the XNOR into an
// inverter of X, so the second half-bit is X and the first is ~X. Mode and CLR
// are separate inputs because CLR also initialises the encoder; the system
// controller must keep CLR high while Manchester is selected, which a
// deferred assertion below checks whenever the inputs have settled.
//
// Timing: one data bit per CLK cycle. X (and mode, clr) change just after a
// rising edge of CLK and are held for the whole cycle; the code for that bit
// appears in the same cycle (no latency), first half while CLK is high, second
// half while CLK is low. The output is combinational in CLK, X and the state,
// as in the architecture it follows; it is meant to drive a modulator, not to
// be re-sampled by CLK.
//
// The structure, the mode encoding and the CLR-based Manchester operation are
// those of the SOLS architecture; the polarity and asynchronous timing of CLR,
// the rising-edge state update and the clock phase convention are choices of
// this design.
module sols_encoder
  import sols_pkg::*;
(
  input  logic  clk,   // bit clock CLK, also the half-bit select
  input  logic  clr,   // clear of DFFB, active high; high in Manchester mode
  input  mode_e mode,  // MODE_FM0 or MODE_MANCHESTER
  input  logic  x,     // data bit X, one per CLK cycle
  output logic  code   // FM0 or Manchester code
);

  logic b_prev;  // DFFB output, B(t-1)
  logic a_pre;   // MUX_2 output: B(t-1) in FM0, X in Manchester
  logic b_pre;   // XNOR output: ~B(t) in FM0, ~X in Manchester
  logic mux1;    // MUX_1 output, before the shared inverter
  logic b_next;  // DFFB input: the code as it stands at the end of the bit

  sols_a_logic u_a_logic (
    .mode   (mode),
    .b_prev (b_prev),
    .x      (x),
    .a_pre  (a_pre)
  );

  sols_b_logic u_b_logic (
    .x      (x),
    .b_prev (b_prev),
    .b_pre  (b_pre)
  );

  // MUX_1 (CLK high: first half-bit) and the shared inverter.
  always_comb begin
    mux1 = clk ? a_pre : b_pre;
    code = ~mux1;
  end

  // DFFB stores the code as it was just before the rising edge, i.e. with
  // MUX_1 still on its CLK-low input. In the gate-level circuit the flop
  // takes the inverter output directly and the MUX_1 plus inverter delay
  // covers its hold time; with zero-delay RTL the select would change in the
  // same instant as the flop samples, so the second-half value is named here.
  always_comb b_next = ~b_pre;

  sols_state_reg u_dffb (
    .clk (clk),
    .clr (clr),
    .d   (b_next),
    .q   (b_prev)
  );

  // Manchester coding is only correct while DFFB is held cleared.
  always_comb begin
    if (mode == MODE_MANCHESTER)
      a_manchester_needs_clr : assert final (clr)
        else $error("Manchester mode selected while CLR is low");
  end

endmodule
