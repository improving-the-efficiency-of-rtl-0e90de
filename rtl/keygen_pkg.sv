// keygen_pkg: types shared by the fuzzy extractor controller and the top of
// the PUF key generator.
package keygen_pkg;

  // operation requested with start
  typedef enum logic {
    OP_ENROLL   = 1'b0,   // encode the supplied key, store helper data
    OP_GENERATE = 1'b1    // rebuild the key from helper data and the PUF
  } op_e;

endpackage
