// Shared types of the FM0 / Manchester encoder.
//
// code_mode_e is the Mode input of sols_encoder: it chooses which line code
// the one shared datapath produces. The numeric encoding (0 = FM0,
// 1 = Manchester) is this design's choice.
`timescale 1ns/1ps

package sols_pkg;

  typedef enum logic {
    MODE_FM0        = 1'b0,
    MODE_MANCHESTER = 1'b1
  } code_mode_e;

endpackage
