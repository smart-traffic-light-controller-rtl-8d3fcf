// tl_output_logic: output decode of the smart traffic light controller.
//
// Combinational, Moore: from the present state (and the b_into_c flag) it
// gives the colour of L1..L8, tEn and tsel. Load states raise tEn for one
// cycle so the counter takes the period named by tsel; the wait state that
// follows shows the same colours and keeps tsel unchanged with tEn low.
// Phase A shows L1, L5; phase B L2, L4, L6, L8; phase C L3, L7, plus L2 and
// L6 when they carry over from phase B (see tl_next_state). Everything not
// served is red. The colour codes and which movements share a phase follow
// the original design; the decode of tsel is this design's choice.
module tl_output_logic
  import tl_pkg::*;
(
  input  state_t  state,
  input  logic    b_into_c,
  output lights_t lights,
  output logic    ten,
  output tsel_t   tsel
);

  always_comb begin
    lights = {8{RED}};
    ten    = 1'b0;
    tsel   = TSEL_3;

    unique case (state)
      A_LD20, A_G20, A_LD40, A_G40, A_LD60, A_G60: begin
        lights[L1] = GREEN;
        lights[L5] = GREEN;
      end
      A_LDY, A_Y: begin
        lights[L1] = YELLOW;
        lights[L5] = YELLOW;
      end
      B_LD20, B_G20, B_LD40, B_G40, B_LD60, B_G60: begin
        lights[L2] = GREEN;
        lights[L4] = GREEN;
        lights[L6] = GREEN;
        lights[L8] = GREEN;
      end
      B_LDY, B_Y: begin
        lights[L2] = b_into_c ? GREEN : YELLOW;
        lights[L4] = YELLOW;
        lights[L6] = b_into_c ? GREEN : YELLOW;
        lights[L8] = YELLOW;
      end
      C_LD15, C_G15: begin
        lights[L2] = b_into_c ? GREEN : RED;
        lights[L3] = GREEN;
        lights[L6] = b_into_c ? GREEN : RED;
        lights[L7] = GREEN;
      end
      C_LDY, C_Y: begin
        lights[L2] = b_into_c ? YELLOW : RED;
        lights[L3] = YELLOW;
        lights[L6] = b_into_c ? YELLOW : RED;
        lights[L7] = YELLOW;
      end
      default: ;
    endcase

    unique case (state)
      A_LD20, A_G20, B_LD20, B_G20: tsel = TSEL_20;
      A_LD40, A_G40, B_LD40, B_G40: tsel = TSEL_40;
      A_LD60, A_G60, B_LD60, B_G60: tsel = TSEL_60;
      C_LD15, C_G15:                tsel = TSEL_15;
      default:                      tsel = TSEL_3;
    endcase

    unique case (state)
      A_LD20, A_LD40, A_LD60, A_LDY,
      B_LD20, B_LD40, B_LD60, B_LDY,
      C_LD15, C_LDY: ten = 1'b1;
      default:       ten = 1'b0;
    endcase
  end

endmodule
