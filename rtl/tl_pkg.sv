// tl_pkg: types and constants shared by the smart traffic light controller.
//
// The controller drives eight traffic movements L1..L8 of two adjacent
// intersections in three phases: phase A (L1, L5, paced by the congestion
// code S1), phase B (L2, L4, L6, L8, paced by S2) and phase C (the minor
// roads L3, L7, served for a fixed 15 s when S3 is set). Each light is a
// 3-bit one-hot colour. The five light periods (60, 40, 20, 15 and 3 s) and
// the 5-bit state codes that appear in the controller's own simulation
// traces are taken from the original design; the numeric tsel encoding and
// the codes of states never shown there are choices of this design.
package tl_pkg;

  // Colour of one light: one-hot {green, yellow, red}.
  typedef enum logic [2:0] {
    RED    = 3'b001,
    YELLOW = 3'b010,
    GREEN  = 3'b100
  } light_t;

  // Congestion code of Tables 1 and 2: level 1..4 -> 00..11, giving a
  // green time of 0, 20, 40 or 60 s.
  typedef logic [1:0] level_t;

  localparam int unsigned CNT_W = 6;  // every light period fits in six bits
  typedef logic [CNT_W-1:0] count_t;

  // Light period selected for the counter.
  typedef enum logic [2:0] {
    TSEL_60 = 3'd0,
    TSEL_40 = 3'd1,
    TSEL_20 = 3'd2,
    TSEL_15 = 3'd3,
    TSEL_3  = 3'd4
  } tsel_t;

  // Controller state. Bits [4:3] name the phase (00 A, 01 B, 10 C, 11 idle),
  // bits [2:0] the step inside it. An even code is the one-cycle load step
  // that arms the counter (tEn = 1); the odd code after it holds the lights
  // while the counter runs.
  typedef enum logic [4:0] {
    ST_INIT = 5'b11000,  // after reset, all red
    A_SKIP  = 5'b11001,  // S1 = 00: phase A gets 0 s
    B_SKIP  = 5'b11010,  // S2 = 00: phase B gets 0 s
    A_LD20  = 5'b00000,
    A_G20   = 5'b00001,
    A_LD40  = 5'b00010,
    A_G40   = 5'b00011,
    A_LD60  = 5'b00100,
    A_G60   = 5'b00101,
    A_LDY   = 5'b00110,
    A_Y     = 5'b00111,
    B_LD20  = 5'b01000,
    B_G20   = 5'b01001,
    B_LD40  = 5'b01010,
    B_G40   = 5'b01011,
    B_LD60  = 5'b01100,
    B_G60   = 5'b01101,
    B_LDY   = 5'b01110,
    B_Y     = 5'b01111,
    C_LD15  = 5'b10100,
    C_G15   = 5'b10101,
    C_LDY   = 5'b10110,
    C_Y     = 5'b10111
  } state_t;

  // Index of each movement in an 8-entry light array (L1 is index 0).
  typedef enum int unsigned {
    L1 = 0, L2 = 1, L3 = 2, L4 = 3, L5 = 4, L6 = 5, L7 = 6, L8 = 7
  } movement_t;

  typedef light_t [7:0] lights_t;

endpackage
