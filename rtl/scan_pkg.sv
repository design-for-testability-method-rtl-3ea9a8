// scan_pkg: constants and types shared by the full-scan blocks.
//
// The circuit under test has six D flip-flops, each behind a 2-to-1
// multiplexer, and one SELECT pin that picks the multiplexer input for all
// of them at once. SELECT = 1 is test mode (the flip-flops form a shift
// register from SI to SO), SELECT = 0 is normal mode (each flip-flop loads
// the value its logic computes). The flip-flop count and the SELECT encoding
// follow the source circuit.
package scan_pkg;

  // Number of scan flip-flops, FF1..FF6.
  localparam int unsigned N_SCAN_FF = 6;

  // Encoding of the SELECT pin.
  typedef enum logic {
    NORMAL_MODE = 1'b0,   // capture: flip-flop loads its functional input
    TEST_MODE   = 1'b1    // shift:   flip-flop loads the previous cell's output
  } scan_mode_e;

endpackage
