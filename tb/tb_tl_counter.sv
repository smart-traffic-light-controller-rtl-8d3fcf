// tb_tl_counter: self-checking test of the light-period counter.
//
// For every timer_sel code (and an unused one), and for random reload
// points, it pulses ld for one clock and checks that count then steps down
// by one per clock from period-1, that t_out is high in exactly the clock
// where a phase of that period ends (period-1 clocks after the load clock),
// that the count then rests at zero, and that a reload in mid-count takes
// effect at once. Expected periods are the constants 60/40/20/15/3 written
// here, not read from the design.
module tb_tl_counter;
  import tl_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  tsel_t  timer_sel;
  logic   ld;
  count_t count;
  logic   t_out;

  int checks = 0;
  int failures = 0;

  tl_counter dut (.*);

  always #5 clk = ~clk;

  function automatic int period_of(logic [2:0] sel);
    case (sel)
      3'd0: return 60;
      3'd1: return 40;
      3'd2: return 20;
      3'd3: return 15;
      default: return 3;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (count=%0d t_out=%0b)", what, count, t_out);
    end
  endtask

  // Load sel, then watch the whole period.
  task automatic run_period(logic [2:0] sel);
    int p = period_of(sel);
    int seen_tout = 0;
    @(negedge clk);
    timer_sel = tsel_t'(sel);
    ld = 1'b1;
    check(t_out == 1'b0, "t_out low while loading");
    @(negedge clk);
    ld = 1'b0;
    // Clocks 1 .. p-1 of the phase; clock 0 was the load clock.
    for (int k = 1; k < p; k++) begin
      check(count == count_t'(p - k), $sformatf("sel %0d count at clock %0d", sel, k));
      check(t_out == (k == p - 1), $sformatf("sel %0d t_out at clock %0d", sel, k));
      if (t_out) seen_tout++;
      @(negedge clk);
    end
    check(seen_tout == 1, $sformatf("sel %0d exactly one t_out", sel));
    // The count rests at zero with t_out low.
    repeat (3) begin
      check(count == '0 && !t_out, $sformatf("sel %0d rests at zero", sel));
      @(negedge clk);
    end
  endtask

  initial begin
    rst = 1'b1;
    ld = 1'b0;
    timer_sel = TSEL_3;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(count == '0, "reset clears count");
    rst = 1'b0;

    for (int s = 0; s < 8; s++) run_period(3'(s));

    // Reload in the middle of a count.
    for (int r = 0; r < 40; r++) begin
      automatic int p, wait_n;
      automatic logic [2:0] sel = 3'($urandom_range(0, 4));
      automatic logic [2:0] sel2 = 3'($urandom_range(0, 4));
      @(negedge clk);
      timer_sel = tsel_t'(sel);
      ld = 1'b1;
      @(negedge clk);
      ld = 1'b0;
      p = period_of(sel);
      wait_n = $urandom_range(0, p - 2);
      repeat (wait_n) @(negedge clk);
      check(count == count_t'(p - 1 - wait_n), "count before reload");
      timer_sel = tsel_t'(sel2);
      ld = 1'b1;
      @(negedge clk);
      ld = 1'b0;
      check(count == count_t'(period_of(sel2) - 1), "reload takes effect");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
