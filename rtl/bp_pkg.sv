// Shared definitions of the polar belief-propagation (BP) node network.
//
// adder_e selects which parallel-prefix adder sits inside every F node:
// the Kogge-Stone adder (shallowest carry tree, most area) or the
// Brent-Kung adder (deeper tree, fewer prefix cells). Both variants of the
// decoder are built from the same source by this one parameter.
//
// LLR values travel through the network in sign-magnitude form: a sign bit
// (1 = negative) and an unsigned magnitude of a width set per instance.
package bp_pkg;

  typedef enum logic {
    ADDER_KS = 1'b0,  // Kogge-Stone
    ADDER_BK = 1'b1   // Brent-Kung
  } adder_e;

endpackage
