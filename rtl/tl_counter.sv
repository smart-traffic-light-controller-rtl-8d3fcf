// tl_counter: light-period timer of the smart traffic light controller.
//
// A five-way selector picks one of the periods 60, 40, 20, 15 or 3 s by
// timer_sel; a second selector, steered by ld, feeds the count register
// either that period or its own value minus one, so the register counts down
// one per clock (one clock is one second of light time). This is the
// structure of the original design. What is this design's own: the load
// cycle itself counts as the first second, so ld stores the period minus
// one; the count stops at zero instead of wrapping; and t_out is raised in
// the last second of the period (count = 1), so the controller state that
// loads the counter plus the state that waits for t_out last exactly the
// selected number of clocks. A timer_sel code outside the five periods
// loads the 3 s period.
//
// Interface: clk, synchronous active-high rst (count cleared), timer_sel and
// ld from the controller, t_out back to it; count is brought out for
// observation. t_out is combinational from the register and is low while
// ld is high.
module tl_counter
  import tl_pkg::*;
#(
  parameter int unsigned P_60 = 60,
  parameter int unsigned P_40 = 40,
  parameter int unsigned P_20 = 20,
  parameter int unsigned P_15 = 15,
  parameter int unsigned P_3  = 3
) (
  input  logic   clk,
  input  logic   rst,
  input  tsel_t  timer_sel,
  input  logic   ld,
  output count_t count,
  output logic   t_out
);

  count_t period;

  // Timer selector.
  always_comb begin
    unique case (timer_sel)
      TSEL_60: period = count_t'(P_60);
      TSEL_40: period = count_t'(P_40);
      TSEL_20: period = count_t'(P_20);
      TSEL_15: period = count_t'(P_15);
      TSEL_3:  period = count_t'(P_3);
      default: period = count_t'(P_3);
    endcase
  end

  // Load selector and down counter.
  always_ff @(posedge clk) begin
    if (rst)
      count <= '0;
    else if (ld)
      count <= (period == '0) ? '0 : period - count_t'(1);
    else if (count != '0)
      count <= count - count_t'(1);
  end

  assign t_out = !ld && (count == count_t'(1));

  initial begin
    assert (P_60 >= 2 && P_40 >= 2 && P_20 >= 2 && P_15 >= 2 && P_3 >= 2)
      else $error("tl_counter: every light period must be at least 2 clocks");
    assert (P_60 < 2**CNT_W && P_40 < 2**CNT_W && P_20 < 2**CNT_W &&
            P_15 < 2**CNT_W && P_3 < 2**CNT_W)
      else $error("tl_counter: a light period does not fit in the count register");
  end

endmodule
