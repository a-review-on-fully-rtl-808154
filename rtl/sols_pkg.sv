// Shared types of the SOLS FM0/Manchester encoder.
//
// The encoder has one control input besides the clear: the coding mode. The
// encoding of that input (0 = FM0, 1 = Manchester) is the one the encoder's
// mode multiplexer uses, so the enum values are fixed by the datapath and must
// not be changed on their own.
package sols_pkg;

  // Coding mode, driven by the system controller together with CLR.
  typedef enum logic {
    MODE_FM0        = 1'b0,
    MODE_MANCHESTER = 1'b1
  } mode_e;

endpackage
