// tl_congestion_merge: related-traffic congestion codes S1 and S2.
//
// Movements that turn green together share one congestion code: S1 is the
// highest level of L1 and L5, and S2 the highest level of L2, L4, L6 and L8,
// as the original design specifies. Levels use the 2-bit code of the
// period tables (00 = level 1 ... 11 = level 4), so the highest level is the
// largest code. Purely combinational; the controller samples S1 and S2 only
// when it decides the length of the next phase.
module tl_congestion_merge
  import tl_pkg::*;
(
  input  level_t lvl_l1,
  input  level_t lvl_l5,
  input  level_t lvl_l2,
  input  level_t lvl_l4,
  input  level_t lvl_l6,
  input  level_t lvl_l8,
  output level_t s1,
  output level_t s2
);

  function automatic level_t max2(level_t a, level_t b);
    return (a > b) ? a : b;
  endfunction

  assign s1 = max2(lvl_l1, lvl_l5);
  assign s2 = max2(max2(lvl_l2, lvl_l4), max2(lvl_l6, lvl_l8));

endmodule
