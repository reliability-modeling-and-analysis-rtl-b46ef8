`timescale 1ps/1ps
// Shared types for the two-phase clockless wave pipeline.
//
// A switch is a level-sensitive latch steered by a request level. Its polarity
// says on which level it is transparent: an n-switch passes data while its
// request is high and holds while it is low; a p-switch does the opposite.
// Boundaries between stages alternate n and p. Redundant request lines are
// combined before a switch either by the AND/OR masking rule (OR in front of an
// n-switch, AND in front of a p-switch) or, as an alternative, by a majority
// vote. The majority option is this design's reading of the suggested
// "cascade of AND and OR gates" and is not the default.
package cwp_pkg;

  typedef enum logic {
    SW_N = 1'b0,   // transparent while the request is high
    SW_P = 1'b1    // transparent while the request is low
  } sw_pol_e;

  typedef enum logic {
    MASK_AND_OR   = 1'b0,  // OR at n-switches, AND at p-switches
    MASK_MAJORITY = 1'b1   // majority of the lines, ties resolved as AND/OR
  } mask_mode_e;

  // The polarity of the other switch in a bipolar pair.
  function automatic sw_pol_e opposite(sw_pol_e p);
    return (p == SW_N) ? SW_P : SW_N;
  endfunction

  // Polarity of boundary b of the pipeline: boundary 0 (the primary input)
  // has polarity first and the kinds alternate from there.
  function automatic sw_pol_e boundary_pol(int unsigned b, sw_pol_e first);
    return (b % 2 == 0) ? first : opposite(first);
  endfunction

endpackage
