// scan_pkg: types shared by the design-level scan blocks.
//
// A scan session is one uninterrupted stretch of cycles with scan_en high.
// The ScanMode pin tells the embedded RAMs which kind of session it is:
// SCAN_OUT reads the current state out of the chain (RAMs start at address
// zero so their bits leave in a fixed order), SCAN_IN loads a new state image
// (the address generator starts at an offset chosen so that every RAM bit
// lands at its own address when the session ends). The encoding is this
// design's choice.
package scan_pkg;

  typedef enum logic {
    SCAN_OUT = 1'b0,
    SCAN_IN  = 1'b1
  } scan_mode_e;

endpackage
