// Shared constants and helpers for the DigiFAB digit-serial multiplier.
//
// A FAB digit is 4 bits. The default cluster is 4 x 4 RFABs and the default
// largest multiplier is 32 x 32 bits (8 x 8 digits), the size the design is
// evaluated at. The helper functions give the padded digit counts
// M* = ceil(M/K)*K and N* = ceil(N/L)*L used throughout.
package digifab_pkg;

  // ceil(x / y)
  function automatic int unsigned ceil_div(input int unsigned x, input int unsigned y);
    return (x + y - 1) / y;
  endfunction

  // Sequencer phase.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,  // waiting for start
    PH_TILE  = 2'd1,  // cluster works on tile (col, row)
    PH_FINAL = 2'd2   // extra pass: final addition of one tile row
  } phase_e;

endpackage
