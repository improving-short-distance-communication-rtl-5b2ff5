// sols_pkg: types shared by the FM0 / Manchester encoder.
//
// The encoder has one mode input that selects which line code the shared
// logic produces. The published architecture calls this signal Mode but does
// not give its polarity; here 0 selects FM0 and 1 selects Manchester.
package sols_pkg;

  typedef enum logic {
    MODE_FM0        = 1'b0,  // FM0 (bi-phase space) code
    MODE_MANCHESTER = 1'b1   // Manchester code, X XOR CLK
  } code_mode_e;

endpackage
