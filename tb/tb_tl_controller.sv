// tb_tl_controller: test of the controller state machine against the five
// test cases of the design's specification.
//
// A small timer model stands in for the counter: tEn starts a period of the
// length named by tsel, and t_out is raised in its last clock. For each case
// (S1, S2, S3 held constant) the testbench resets the controller and records
// the sequence of states with the number of clocks spent in each, and checks
// it against the expected sequence: every load step lasts one clock, every
// wait step period-1 clocks, a skip step one clock. It also checks the total
// time each movement is green and the carry-over of L2/L6 into the minor
// road phase.
module tb_tl_controller;
  import tl_pkg::*;

  logic    clk = 1'b0;
  logic    rst;
  level_t  s1, s2;
  logic    s3;
  logic    t_out;
  lights_t lights;
  logic    ten;
  tsel_t   tsel;
  state_t  state;

  int checks = 0;
  int failures = 0;

  tl_controller dut (.*);

  always #5 clk = ~clk;

  // Timer model: cycles since the load clock, and the loaded period.
  int since, per;
  always_ff @(posedge clk) begin
    if (rst) begin
      since <= 0;
      per   <= 0;
    end else if (ten) begin
      since <= 1;
      case (tsel)
        TSEL_60: per <= 60;
        TSEL_40: per <= 40;
        TSEL_20: per <= 20;
        TSEL_15: per <= 15;
        default: per <= 3;
      endcase
    end else begin
      since <= since + 1;
    end
  end
  assign t_out = !ten && per > 0 && since == per - 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int green_time(level_t s);
    return 20 * int'(s);
  endfunction

  // Run one case: expected states and their durations in clocks.
  task automatic run_case(int id, level_t a, level_t b, logic c,
                          logic [4:0] exp_st[], int exp_len[]);
    logic [4:0] got_st[$];
    int         got_len[$];
    int         green[8];
    int         l2_run, l2_best;
    int         total;
    s1 = a; s2 = b; s3 = c;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    total = 0;
    foreach (exp_len[i]) total += exp_len[i];
    foreach (green[i]) green[i] = 0;
    l2_run = 0;
    l2_best = 0;
    // Sample each clock's state at the negedge.
    for (int k = 0; k < total; k++) begin
      if (got_st.size() == 0 || got_st[$] != 5'(state)) begin
        got_st.push_back(5'(state));
        got_len.push_back(1);
      end else begin
        got_len[$] = got_len[$] + 1;
      end
      // The last clock already belongs to the next light cycle.
      if (k < total - 1)
        foreach (green[i]) if (lights[i] == GREEN) green[i]++;
      if (lights[L2] == GREEN) l2_run++; else l2_run = 0;
      if (l2_run > l2_best) l2_best = l2_run;
      @(negedge clk);
    end
    check(got_st.size() >= exp_st.size(), $sformatf("case %0d: %0d states seen", id, got_st.size()));
    foreach (exp_st[i]) begin
      if (i < got_st.size()) begin
        check(got_st[i] == exp_st[i],
              $sformatf("case %0d: state %0d is %05b, expected %05b", id, i, got_st[i], exp_st[i]));
        check(got_len[i] == exp_len[i],
              $sformatf("case %0d: state %05b lasted %0d clocks, expected %0d", id, got_st[i], got_len[i], exp_len[i]));
      end
    end
    // Green time of each movement over one light cycle (first entry of the
    // list is ST_INIT, the last the start of the next cycle).
    check(green[L1] == green_time(a) && green[L5] == green_time(a),
          $sformatf("case %0d: L1/L5 green %0d/%0d clocks", id, green[L1], green[L5]));
    check(green[L4] == green_time(b) && green[L8] == green_time(b),
          $sformatf("case %0d: L4/L8 green %0d/%0d clocks", id, green[L4], green[L8]));
    check(green[L3] == (c ? 15 : 0) && green[L7] == green[L3],
          $sformatf("case %0d: L3/L7 green %0d/%0d clocks", id, green[L3], green[L7]));
    if (c && b != 0)
      check(l2_best == green_time(b) + 3 + 15 && green[L6] == green[L2],
            $sformatf("case %0d: L2 carried over, green run %0d clocks", id, l2_best));
    else
      check(green[L2] == green_time(b) && green[L6] == green_time(b),
            $sformatf("case %0d: L2/L6 green %0d/%0d clocks", id, green[L2], green[L6]));
  endtask

  initial begin
    rst = 1'b1;
    s1 = '0; s2 = '0; s3 = 1'b0;
    // Case 1: S1=01, S2=00, S3=0.
    run_case(1, 2'b01, 2'b00, 1'b0,
             '{5'b11000, 5'b00000, 5'b00001, 5'b00110, 5'b00111, 5'b11010, 5'b00000},
             '{1, 1, 19, 1, 2, 1, 1});
    // Case 2: S1=00, S2=10, S3=0.
    run_case(2, 2'b00, 2'b10, 1'b0,
             '{5'b11000, 5'b11001, 5'b01010, 5'b01011, 5'b01110, 5'b01111, 5'b11001},
             '{1, 1, 1, 39, 1, 2, 1});
    // Case 3: S1=11, S2=01, S3=0.
    run_case(3, 2'b11, 2'b01, 1'b0,
             '{5'b11000, 5'b00100, 5'b00101, 5'b00110, 5'b00111,
               5'b01000, 5'b01001, 5'b01110, 5'b01111, 5'b00100},
             '{1, 1, 59, 1, 2, 1, 19, 1, 2, 1});
    // Case 4: S1=10, S2=00, S3=1.
    run_case(4, 2'b10, 2'b00, 1'b1,
             '{5'b11000, 5'b00010, 5'b00011, 5'b00110, 5'b00111, 5'b11010,
               5'b10100, 5'b10101, 5'b10110, 5'b10111, 5'b00010},
             '{1, 1, 39, 1, 2, 1, 1, 14, 1, 2, 1});
    // Case 5: S1=01, S2=01, S3=1.
    run_case(5, 2'b01, 2'b01, 1'b1,
             '{5'b11000, 5'b00000, 5'b00001, 5'b00110, 5'b00111,
               5'b01000, 5'b01001, 5'b01110, 5'b01111,
               5'b10100, 5'b10101, 5'b10110, 5'b10111, 5'b00000},
             '{1, 1, 19, 1, 2, 1, 19, 1, 2, 1, 14, 1, 2, 1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
