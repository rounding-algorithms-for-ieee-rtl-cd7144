// Shared types for the rounding datapaths.
//
// rmode_e lists the rounding modes the multiplier supports. The four IEEE 754
// modes come with a fifth, round to nearest/up (ties rounded away from zero),
// which is the raw result of every rounding algorithm before the tie fix.
// The numeric encoding is a choice of this design; it follows the common
// RISC-V convention (RNE=0, RTZ=1, RDN=2, RUP=3, ties-away=4).
package rnd_pkg;

  typedef enum logic [2:0] {
    RM_RNE = 3'd0,  // round to nearest, ties to even (IEEE default)
    RM_RTZ = 3'd1,  // round toward zero (truncate)
    RM_RDN = 3'd2,  // round toward -infinity
    RM_RUP = 3'd3,  // round toward +infinity
    RM_RNU = 3'd4   // round to nearest/up (ties away from zero)
  } rmode_e;

  // Rin: the rounding 1 added at the R bit. It is 1 for the nearest modes and
  // 0 for the modes that start from a truncated result (Rv is then 0 as well).
  function automatic logic mode_rin(rmode_e m);
    return (m == RM_RNE) || (m == RM_RNU);
  endfunction

endpackage
