// Logic for A(t)/~X: the operand multiplexer of the shared inverter.
//
// In FM0 the first half of a bit window carries A(t) = ~B(t-1); in Manchester
// it carries ~X. Both are an inversion, so one inverter serves both codes and
// this block only chooses what is inverted: the previous state B(t-1) when
// mode is FM0, the data bit X when mode is Manchester (MUX_2 of the encoder).
// The inverter itself is not in here: in the balanced-computation-time
// arrangement it sits after MUX_1 and is shared with the B(t)/X path.
//
// Interface: purely combinational, no clock. a_pre is the value that, once
// inverted, becomes A(t) (FM0) or ~X (Manchester). The function, the mode
// encoding and the input order follow the SOLS architecture; nothing here is
// a free choice beyond the default branch for an impossible mode value.
module sols_a_logic
  import sols_pkg::*;
(
  input  mode_e mode,    // MODE_FM0 selects b_prev, MODE_MANCHESTER selects x
  input  logic  b_prev,  // B(t-1), the state flip-flop output
  input  logic  x,       // data bit X
  output logic  a_pre    // operand of the shared inverter for the first half-bit
);

  always_comb begin
    unique case (mode)
      MODE_FM0:        a_pre = b_prev;
      MODE_MANCHESTER: a_pre = x;
      default:         a_pre = b_prev;
    endcase
  end

endmodule
