// sols_pkg: types shared by the DSRC line encoders.
//
// The SOLS encoder emits one of two line codes for the same bit stream. The
// code is chosen by a one-bit mode input; this package gives that bit a name.
// The encoding (0 = FM0, 1 = Manchester) is this design's own choice.
package sols_pkg;

  typedef enum logic {
    CODE_FM0        = 1'b0,
    CODE_MANCHESTER = 1'b1
  } code_mode_e;

endpackage : sols_pkg
