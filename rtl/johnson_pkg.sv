// johnson_pkg: constants and types shared by the reconfigurable Johnson
// counter and its testbenches.
//
// JC_STAGES is the number of flip-flop stages of the counter (L); the design
// is presented as a 4-bit counter, so the default is 4. mode_e names the two
// values of the Mode input: MODE_COUNT (1) runs the Johnson sequence,
// MODE_ROTATE (0) circulates the stored vector. The encoding follows the
// design (Mode = 1 selects counting); the names are this implementation's own.
package johnson_pkg;

  parameter int unsigned JC_STAGES = 4;

  typedef enum logic {
    MODE_ROTATE = 1'b0,
    MODE_COUNT  = 1'b1
  } mode_e;

endpackage : johnson_pkg
