// tb_smart_tlc: end-to-end test of the smart traffic light controller at
// its default parameters (one clock = one second, periods 60/40/20/15/3).
//
// A reference model written at the level of phases (which group is lit,
// in which colour, for how many seconds) predicts the eight lights every
// clock; it knows nothing of the state codes or the counter. It samples
// S1 = max(L1, L5), S2 = max(L2, L4, L6, L8) and S3 in the last clock
// before a phase starts, as the specification's "decided at phase entry"
// rule requires.
//
// Part 1 runs the five test cases of the specification with constant
// inputs and also checks the first green time of each group in seconds.
// Part 2 changes the congestion levels and S3 at random times for many
// light cycles. Every mechanism of the design is counted (each green
// period, each skipped phase, the minor-road phase with and without L2/L6
// carried over, a level change while a phase is running) and a mechanism
// that never happened counts as a failure.
module tb_smart_tlc;
  import tl_pkg::*;

  logic    clk = 1'b0;
  logic    rst;
  level_t  lvl_l1, lvl_l2, lvl_l4, lvl_l5, lvl_l6, lvl_l8;
  logic    s3;
  lights_t lights;
  state_t  state;
  count_t  count;

  int checks = 0;
  int failures = 0;

  smart_tlc dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  typedef enum int {M_INIT, M_SKIP, M_AG, M_AY, M_BG, M_BY, M_CG, M_CY} mphase_t;
  typedef enum int {NEXT_A, NEXT_B, NEXT_C} after_skip_t;

  mphase_t     m_ph;
  int          m_rem;
  logic        m_carry;
  after_skip_t m_after;  // what follows a skip step

  // Mechanism counters.
  int n_a[4], n_b[4], n_skip_a, n_skip_b, n_c_carry, n_c_alone, n_c_none, n_mid_change;

  function automatic level_t mx(level_t a, level_t b);
    return a > b ? a : b;
  endfunction
  function automatic level_t cur_s1();
    return mx(lvl_l1, lvl_l5);
  endfunction
  function automatic level_t cur_s2();
    return mx(mx(lvl_l2, lvl_l4), mx(lvl_l6, lvl_l8));
  endfunction

  function automatic lights_t model_lights();
    lights_t l = {8{RED}};
    case (m_ph)
      M_AG: begin l[0] = GREEN;  l[4] = GREEN;  end
      M_AY: begin l[0] = YELLOW; l[4] = YELLOW; end
      M_BG: begin l[1] = GREEN; l[3] = GREEN; l[5] = GREEN; l[7] = GREEN; end
      M_BY: begin
        l[3] = YELLOW; l[7] = YELLOW;
        l[1] = m_carry ? GREEN : YELLOW; l[5] = l[1];
      end
      M_CG: begin l[2] = GREEN;  l[6] = GREEN;  if (m_carry) begin l[1] = GREEN;  l[5] = GREEN;  end end
      M_CY: begin l[2] = YELLOW; l[6] = YELLOW; if (m_carry) begin l[1] = YELLOW; l[5] = YELLOW; end end
      default: ;
    endcase
    return l;
  endfunction

  task automatic start_a();
    level_t s = cur_s1();
    m_carry = 1'b0;
    if (s == 0) begin
      m_ph = M_SKIP; m_rem = 1; m_after = NEXT_B; n_skip_a++;
    end else begin
      m_ph = M_AG; m_rem = 20 * int'(s); n_a[s]++;
    end
  endtask

  task automatic start_b();
    level_t s = cur_s2();
    if (s == 0) begin
      m_ph = M_SKIP; m_rem = 1; m_after = NEXT_C; n_skip_b++;
    end else begin
      m_ph = M_BG; m_rem = 20 * int'(s); n_b[s]++;
    end
  endtask

  // Advance the model by one clock, using the inputs of the present clock.
  task automatic model_step();
    m_rem--;
    if (m_rem > 0) return;
    case (m_ph)
      M_INIT: start_a();
      M_SKIP:
        if (m_after == NEXT_B) start_b();
        else if (s3) begin m_ph = M_CG; m_rem = 15; m_carry = 1'b0; n_c_alone++; end
        else begin n_c_none++; start_a(); end
      M_AG: begin m_ph = M_AY; m_rem = 3; end
      M_AY: start_b();
      M_BG: begin m_ph = M_BY; m_rem = 3; m_carry = s3; end
      M_BY:
        if (m_carry) begin m_ph = M_CG; m_rem = 15; n_c_carry++; end
        else begin n_c_none++; start_a(); end
      M_CG: begin m_ph = M_CY; m_rem = 3; end
      M_CY: start_a();
      default: start_a();
    endcase
  endtask

  task automatic model_reset();
    m_ph = M_INIT; m_rem = 1; m_carry = 1'b0; m_after = NEXT_A;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // One clock: compare, then let the stimulus change inputs, then step.
  task automatic clock_and_check(string tag);
    lights_t e = model_lights();
    check(lights == e, $sformatf("%s t=%0t state=%05b lights=%06h expected=%06h",
                                 tag, $time, state, lights, e));
  endtask

  task automatic do_reset();
    rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    model_reset();
  endtask

  // Set the six levels so that their maxima are a (S1) and b (S2).
  task automatic set_levels(level_t a, level_t b);
    lvl_l1 = a; lvl_l5 = level_t'($urandom_range(0, int'(a)));
    if ($urandom_range(0, 1) == 1) {lvl_l1, lvl_l5} = {lvl_l5, lvl_l1};
    lvl_l2 = level_t'($urandom_range(0, int'(b)));
    lvl_l4 = level_t'($urandom_range(0, int'(b)));
    lvl_l6 = level_t'($urandom_range(0, int'(b)));
    lvl_l8 = level_t'($urandom_range(0, int'(b)));
    case ($urandom_range(0, 3))
      0: lvl_l2 = b;
      1: lvl_l4 = b;
      2: lvl_l6 = b;
      default: lvl_l8 = b;
    endcase
  endtask

  // ------------------------------------------------------- part 1: cases
  task automatic run_case(int id, level_t a, level_t b, logic c);
    int first_green[8];
    int run[8];
    foreach (first_green[i]) begin first_green[i] = -1; run[i] = 0; end
    set_levels(a, b);
    s3 = c;
    do_reset();
    // Two full light cycles at most 2*(60+3+60+3+15+3+3) clocks.
    for (int k = 0; k < 300; k++) begin
      clock_and_check($sformatf("case %0d", id));
      foreach (run[i]) begin
        if (lights[i] == GREEN) run[i]++;
        else begin
          if (run[i] > 0 && first_green[i] < 0) first_green[i] = run[i];
          run[i] = 0;
        end
      end
      model_step();
      @(negedge clk);
    end
    check(first_green[L1] == (a == 0 ? -1 : 20 * int'(a)),
          $sformatf("case %0d: L1 first green %0d s", id, first_green[L1]));
    check(first_green[L4] == (b == 0 ? -1 : 20 * int'(b)),
          $sformatf("case %0d: L4 first green %0d s", id, first_green[L4]));
    check(first_green[L3] == (c ? 15 : -1),
          $sformatf("case %0d: L3 first green %0d s", id, first_green[L3]));
    if (c && b != 0)
      check(first_green[L2] == 20 * int'(b) + 3 + 15,
            $sformatf("case %0d: L2 first green %0d s (carried into phase C)", id, first_green[L2]));
  endtask

  // --------------------------------------------------- part 2: random run
  task automatic run_random(int clocks);
    int next_change = 1;
    do_reset();
    for (int k = 0; k < clocks; k++) begin
      clock_and_check("random");
      if (--next_change == 0) begin
        if (m_ph inside {M_AG, M_BG, M_CG} && m_rem > 2) n_mid_change++;
        set_levels(level_t'($urandom_range(0, 3)), level_t'($urandom_range(0, 3)));
        s3 = ($urandom_range(0, 2) == 0);
        next_change = $urandom_range(1, 90);
      end
      model_step();
      @(negedge clk);
    end
  endtask

  initial begin
    rst = 1'b1;
    s3 = 1'b0;
    set_levels(0, 0);
    foreach (n_a[i]) begin n_a[i] = 0; n_b[i] = 0; end
    n_skip_a = 0; n_skip_b = 0; n_c_carry = 0; n_c_alone = 0; n_c_none = 0; n_mid_change = 0;

    run_case(1, 2'b01, 2'b00, 1'b0);
    run_case(2, 2'b00, 2'b10, 1'b0);
    run_case(3, 2'b11, 2'b01, 1'b0);
    run_case(4, 2'b10, 2'b00, 1'b1);
    run_case(5, 2'b01, 2'b01, 1'b1);
    run_random(40000);

    $display("mechanisms: A20=%0d A40=%0d A60=%0d B20=%0d B40=%0d B60=%0d skipA=%0d skipB=%0d",
             n_a[1], n_a[2], n_a[3], n_b[1], n_b[2], n_b[3], n_skip_a, n_skip_b);
    $display("mechanisms: C with L2/L6=%0d C alone=%0d no C=%0d level change mid-phase=%0d",
             n_c_carry, n_c_alone, n_c_none, n_mid_change);
    check(n_a[1] > 0 && n_a[2] > 0 && n_a[3] > 0, "every phase A period used");
    check(n_b[1] > 0 && n_b[2] > 0 && n_b[3] > 0, "every phase B period used");
    check(n_skip_a > 0, "phase A skipped");
    check(n_skip_b > 0, "phase B skipped");
    check(n_c_carry > 0, "phase C with L2/L6 carried over");
    check(n_c_alone > 0, "phase C after a skipped phase B");
    check(n_c_none > 0, "phase C left out");
    check(n_mid_change > 0, "levels changed while a phase ran");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
