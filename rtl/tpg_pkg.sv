// Shared types for the test-pattern-generator / transition-density design.
// fill_mode_t selects how the X (don't-care) bits of a test cube are filled
// before the cube becomes the seed of the single-input-change generator.
// The three fill styles (zero, one, adjacent) follow the design description;
// their two-bit encoding is this design's own choice.
package tpg_pkg;

  typedef enum logic [1:0] {
    FILL_ZERO = 2'd0,  // every X becomes 0
    FILL_ONE  = 2'd1,  // every X becomes 1
    FILL_ADJ  = 2'd2   // every X copies the nearest specified bit before it
  } fill_mode_t;

  // Width of the transition-density value: percent times 100 (0 .. 10000).
  localparam int unsigned TD_W = 16;

endpackage
