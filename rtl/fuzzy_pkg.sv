// Shared defaults for the many-valued (fuzzy) memory element.
//
// A fuzzy truth value in [0,1] is carried as an unsigned W-bit code k that
// stands for k / (2**W - 1). With this code the value 1 is all ones and the
// standard negation 1 - x is the bitwise complement of x. The level filter
// restricts values to LEVELS points spread evenly over [0,1]; the step between
// two neighbouring points must be a whole number of codes, so (2**W - 1) has to
// be a multiple of (LEVELS - 1). Both sizes are this design's own choice: the
// memory element itself is defined for any value set and any number of levels.
package fuzzy_pkg;

  // Default width of a fuzzy value code (value = code / (2**W - 1)).
  localparam int unsigned W_DEFAULT = 8;

  // Default number of discrete values the filters pass (255 / 15 = 17 codes apart).
  localparam int unsigned LEVELS_DEFAULT = 16;

endpackage
