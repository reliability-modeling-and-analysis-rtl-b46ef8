`timescale 1ps/1ps
// Test-only helpers for the wave pipeline testbenches: the stand-in stage
// function used for the combinational partitions and the per-bit path delays
// of the stage model. The real core logic is supplied by the user of the
// pipeline; this function is only a mixing function with several inputs per
// output bit, so that a datawave mixed from two consecutive waves gives a
// wrong answer.
package cwp_tb_pkg;

  // Result of stage k on datawave x of w bits (w <= 64).
  function automatic logic [63:0] stage_fn(logic [63:0] x, int unsigned k, int unsigned w);
    logic [63:0] m, r1, r3, c;
    m  = (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
    x  = x & m;
    r1 = ((x << 1) | (x >> (w - 1))) & m;
    r3 = ((x << 3) | (x >> (w - 3))) & m;
    c  = (64'h9E37_79B9_7F4A_7C15 * (64'(k) + 64'd1)) & m;
    return (r1 ^ (x & r3) ^ c) & m;
  endfunction

  // Path delay in ps of output bit i of a stage: spread between dmin and
  // dmax, with a bit order scrambled so that fast and slow bits interleave.
  function automatic int unsigned bit_delay(int unsigned i, int unsigned w,
                                            int unsigned dmin, int unsigned dmax);
    int unsigned r;
    r = (i * 7 + 3) % w;
    return dmin + ((dmax - dmin) * r) / (w - 1);
  endfunction

endpackage
