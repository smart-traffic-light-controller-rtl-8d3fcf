// tl_controller: traffic light controller (state machine) of the smart
// traffic light controller.
//
// The original design's controller is a next-state logic block, a 5-bit
// state register and an output logic block; this module is that register
// with the two blocks around it (tl_next_state, tl_output_logic), plus the
// one-bit b_into_c register, this design's addition, which remembers whether
// L2 and L6 carry over from phase B into phase C.
//
// Interface: clk, synchronous active-high rst (to ST_INIT, all red); S1, S2
// congestion codes and S3 minor-road request, sampled when a phase is
// entered; t_out from the counter; L1..L8 colours, tEn (load the counter
// this cycle) and tsel (period to load) to the counter. state is brought out
// for observation. Outputs are combinational from the registers.
//
// Safety rules checked by assertions: a movement of one phase is never
// green or yellow together with a conflicting one, and tEn never stays high
// for two cycles.
module tl_controller
  import tl_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  level_t  s1,
  input  level_t  s2,
  input  logic    s3,
  input  logic    t_out,
  output lights_t lights,
  output logic    ten,
  output tsel_t   tsel,
  output state_t  state
);

  state_t next;
  logic   b_into_c, b_into_c_next;

  tl_next_state u_next (
    .state         (state),
    .b_into_c      (b_into_c),
    .t_out         (t_out),
    .s1            (s1),
    .s2            (s2),
    .s3            (s3),
    .next          (next),
    .b_into_c_next (b_into_c_next)
  );

  // State register.
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_INIT;
      b_into_c <= 1'b0;
    end else begin
      state    <= next;
      b_into_c <= b_into_c_next;
    end
  end

  tl_output_logic u_out (
    .state    (state),
    .b_into_c (b_into_c),
    .lights   (lights),
    .ten      (ten),
    .tsel     (tsel)
  );

  function automatic logic moving(light_t l);
    return l != RED;
  endfunction

  logic phase_a_on, l48_on, l26_on, l37_on;
  assign phase_a_on = moving(lights[L1]) || moving(lights[L5]);
  assign l48_on     = moving(lights[L4]) || moving(lights[L8]);
  assign l26_on     = moving(lights[L2]) || moving(lights[L6]);
  assign l37_on     = moving(lights[L3]) || moving(lights[L7]);

  a_phase_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(phase_a_on && (l48_on || l26_on || l37_on)));
  a_minor_vs_l48: assert property (@(posedge clk) disable iff (rst)
    !(l37_on && l48_on));
  a_ten_one_cycle: assert property (@(posedge clk) disable iff (rst)
    ten |=> !ten);

endmodule
