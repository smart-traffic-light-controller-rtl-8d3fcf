// tl_next_state: next-state logic of the smart traffic light controller.
//
// Combinational. The light cycle is phase A (L1, L5), phase B (L2, L4, L6,
// L8), phase C (L3, L7), then back to A. A phase is entered through a
// one-cycle load state that arms the counter; the following state holds
// the lights until t_out. Green is followed by a 3 s yellow with the same
// load/wait pair.
//
// The length of a phase is decided when it is entered, from the congestion
// code present at that moment: S1 (A) and S2 (B) pick 20, 40 or 60 s, and
// code 00 (0 s) skips the phase through a one-cycle all-red step (A_SKIP,
// B_SKIP). Phase C runs for 15 s when S3 is set. The ordering of phases,
// the green times and the state codes of the phases follow the original
// design; deciding at phase entry, the one-cycle skip steps and the
// b_into_c flag are this design's reading of it.
//
// b_into_c records, when phase B starts its yellow, whether phase C will
// follow. If so L2 and L6 stay green through B's yellow and through phase C
// together with L3 and L7, and only L4 and L8 turn yellow; if not, all four
// turn yellow and the cycle returns to phase A.
module tl_next_state
  import tl_pkg::*;
(
  input  state_t state,
  input  logic   b_into_c,
  input  logic   t_out,
  input  level_t s1,
  input  level_t s2,
  input  logic   s3,
  output state_t next,
  output logic   b_into_c_next
);

  function automatic state_t enter_a(level_t s);
    unique case (s)
      2'b00:   return A_SKIP;
      2'b01:   return A_LD20;
      2'b10:   return A_LD40;
      default: return A_LD60;
    endcase
  endfunction

  function automatic state_t enter_b(level_t s);
    unique case (s)
      2'b00:   return B_SKIP;
      2'b01:   return B_LD20;
      2'b10:   return B_LD40;
      default: return B_LD60;
    endcase
  endfunction

  always_comb begin
    next = state;
    unique case (state)
      ST_INIT: next = enter_a(s1);
      A_SKIP:  next = enter_b(s2);
      B_SKIP:  next = s3 ? C_LD15 : enter_a(s1);

      A_LD20:  next = A_G20;
      A_LD40:  next = A_G40;
      A_LD60:  next = A_G60;
      A_G20, A_G40, A_G60: if (t_out) next = A_LDY;
      A_LDY:   next = A_Y;
      A_Y:     if (t_out) next = enter_b(s2);

      B_LD20:  next = B_G20;
      B_LD40:  next = B_G40;
      B_LD60:  next = B_G60;
      B_G20, B_G40, B_G60: if (t_out) next = B_LDY;
      B_LDY:   next = B_Y;
      B_Y:     if (t_out) next = b_into_c ? C_LD15 : enter_a(s1);

      C_LD15:  next = C_G15;
      C_G15:   if (t_out) next = C_LDY;
      C_LDY:   next = C_Y;
      C_Y:     if (t_out) next = enter_a(s1);

      default: next = ST_INIT;
    endcase
  end

  // Set when B's yellow begins, cleared whenever phase C is reached without
  // a phase B (B_SKIP) and whenever phase A is entered.
  always_comb begin
    b_into_c_next = b_into_c;
    if (next == B_LDY && state != B_LDY)
      b_into_c_next = s3;
    else if (next == B_SKIP || next[4:3] == 2'b00 || next == A_SKIP || next == ST_INIT)
      b_into_c_next = 1'b0;
  end

endmodule
