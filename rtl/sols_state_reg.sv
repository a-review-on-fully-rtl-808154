// DFFB: the single state flip-flop of the retimed FM0 encoder.
//
// A straightforward FM0 encoder keeps A(t) and B(t) in two flip-flops. After
// area-compact retiming only one remains, placed after the half-bit
// multiplexer: it samples the encoder output itself at the rising edge of
// CLK, which is the end of a bit window, when the output is B(t). Its output
// is therefore B(t-1) during the next bit.
//
// CLR clears it. The clear is asynchronous and active high; it is used both to
// initialise the encoder and to hold the state at 0 for as long as the
// Manchester code is selected (these two choices are this design's own: the
// polarity and timing of CLR are not given).
//
// Interface: d is sampled on the rising edge of clk; q follows one edge later,
// or goes to 0 at once while clr is high.
module sols_state_reg (
  input  logic clk,  // bit clock CLK
  input  logic clr,  // asynchronous clear, active high
  input  logic d,    // encoder output (B(t) at the end of the bit window)
  output logic q     // stored state, B(t-1) during the following bit
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= 1'b0;
    else     q <= d;
  end

endmodule
