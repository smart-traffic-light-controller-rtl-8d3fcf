// tb_tl_congestion_merge: exhaustive test of the related-traffic merge.
//
// Drives all 4^6 combinations of the six main-road levels and checks S1
// against the largest of L1, L5 and S2 against the largest of L2, L4, L6,
// L8, worked out here by a loop over the level values.
module tb_tl_congestion_merge;
  import tl_pkg::*;

  level_t lvl_l1, lvl_l5, lvl_l2, lvl_l4, lvl_l6, lvl_l8;
  level_t s1, s2;

  int checks = 0;
  int failures = 0;

  tl_congestion_merge dut (.*);

  // Highest level present among the inputs, by searching down from 3.
  function automatic level_t highest(level_t v[]);
    for (int l = 3; l > 0; l--)
      foreach (v[i]) if (int'(v[i]) == l) return level_t'(l);
    return 2'd0;
  endfunction

  initial begin
    for (int n = 0; n < 4096; n++) begin
      {lvl_l1, lvl_l5, lvl_l2, lvl_l4, lvl_l6, lvl_l8} = 12'(n);
      #1;
      checks++;
      if (s1 !== highest('{lvl_l1, lvl_l5})) begin
        failures++;
        $display("FAIL S1 for input %03h: got %0d", n, s1);
      end
      checks++;
      if (s2 !== highest('{lvl_l2, lvl_l4, lvl_l6, lvl_l8})) begin
        failures++;
        $display("FAIL S2 for input %03h: got %0d", n, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
