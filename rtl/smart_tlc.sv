// smart_tlc: smart traffic light controller with flexible light period for
// two adjacent intersections (top level).
//
// tl_congestion_merge turns the per-movement congestion levels into the
// related-traffic codes S1 (L1, L5) and S2 (L2, L4, L6, L8); tl_controller
// steps through phases A, B and C and tells tl_counter, through tEn and
// tsel, which light period to time; tl_counter answers with t_out when the
// period is over. The split into a counter and a controller, and the wiring
// tsel -> timer_sel, tEn -> Ld, t_out -> t_out, follow the original design;
// taking per-movement levels at the top (instead of S1 and S2 themselves)
// is this design's choice, so the max rule is part of the circuit.
//
// Interface: one clock is one second of light time; rst is synchronous and
// active high. lights[0] is L1 ... lights[7] is L8, one-hot 100 green,
// 010 yellow, 001 red. state and count are brought out for observation.
// Timing: a phase of period T lights its movements for exactly T clocks
// (one load clock plus T-1 counting clocks); a phase whose code is 00 takes
// a single all-red clock.
module smart_tlc
  import tl_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  level_t  lvl_l1,
  input  level_t  lvl_l2,
  input  level_t  lvl_l4,
  input  level_t  lvl_l5,
  input  level_t  lvl_l6,
  input  level_t  lvl_l8,
  input  logic    s3,
  output lights_t lights,
  output state_t  state,
  output count_t  count
);

  level_t s1, s2;
  logic   ten, t_out;
  tsel_t  tsel;

  tl_congestion_merge u_merge (
    .lvl_l1 (lvl_l1),
    .lvl_l5 (lvl_l5),
    .lvl_l2 (lvl_l2),
    .lvl_l4 (lvl_l4),
    .lvl_l6 (lvl_l6),
    .lvl_l8 (lvl_l8),
    .s1     (s1),
    .s2     (s2)
  );

  tl_controller u_ctrl (
    .clk    (clk),
    .rst    (rst),
    .s1     (s1),
    .s2     (s2),
    .s3     (s3),
    .t_out  (t_out),
    .lights (lights),
    .ten    (ten),
    .tsel   (tsel),
    .state  (state)
  );

  tl_counter u_cnt (
    .clk       (clk),
    .rst       (rst),
    .timer_sel (tsel),
    .ld        (ten),
    .count     (count),
    .t_out     (t_out)
  );

endmodule
