// tb_tl_next_state: exhaustive test of the controller's next-state logic.
//
// Applies every combination of the 32 state codes, b_into_c, t_out, S1, S2
// and S3 (8192 in all). The expected next state is built from the fields
// of the state code: a phase entered with code s > 0 starts at the load
// step {phase, s-1, 0}; code 0 goes to the phase's skip step; a load step
// is followed by the wait step one above it; a wait step holds until t_out.
// Codes that name no state return to ST_INIT.
module tb_tl_next_state;
  import tl_pkg::*;

  state_t state, next;
  logic   b_into_c, b_into_c_next, t_out, s3;
  level_t s1, s2;

  int checks = 0;
  int failures = 0;

  tl_next_state dut (.*);

  function automatic logic [4:0] enter(logic [1:0] ph, level_t s);
    if (s == 2'd0) return (ph == 2'b00) ? 5'b11001 : 5'b11010;
    return {ph, 2'(s - 2'd1), 1'b0};
  endfunction

  initial begin
    for (int n = 0; n < 8192; n++) begin
      automatic logic [4:0] code  = 5'(n >> 8);
      automatic logic       carry = n[7];
      automatic logic       to    = n[6];
      automatic level_t     a     = 2'(n >> 4);
      automatic level_t     b     = 2'(n >> 2);
      automatic logic       c     = n[1];
      automatic logic [1:0] ph    = code[4:3];
      automatic logic [2:0] st    = code[2:0];
      automatic logic [4:0] exp_n;
      automatic logic       exp_c;
      automatic bit         run   = (ph != 2'b11) && !(ph == 2'b10 && !st[2]);

      if (n[0]) continue;  // bit 0 unused

      if (run && !st[0])             exp_n = code + 5'd1;
      else if (run && !to)           exp_n = code;
      else if (run && st[2:1] != 2'b11)
        exp_n = {ph, 3'b110};          // green over: yellow load step
      else if (run && ph == 2'b00)   exp_n = enter(2'b01, b);
      else if (run && ph == 2'b01)   exp_n = carry ? 5'b10100 : enter(2'b00, a);
      else if (run)                  exp_n = enter(2'b00, a);
      else if (code == 5'b11000)     exp_n = enter(2'b00, a);
      else if (code == 5'b11001)     exp_n = enter(2'b01, b);
      else if (code == 5'b11010)     exp_n = c ? 5'b10100 : enter(2'b00, a);
      else                           exp_n = 5'b11000;

      if (ph == 2'b01 && st[0] && st[2:1] != 2'b11 && to) exp_c = c;
      else if (exp_n[4:3] == 2'b00 || exp_n[4:3] == 2'b11) exp_c = 1'b0;
      else exp_c = carry;

      state = state_t'(code);
      b_into_c = carry;
      t_out = to;
      s1 = a;
      s2 = b;
      s3 = c;
      #1;
      checks++;
      if (5'(next) !== exp_n) begin
        failures++;
        $display("FAIL next: state=%05b carry=%0b t_out=%0b S1=%0d S2=%0d S3=%0b got %05b exp %05b",
                 code, carry, to, a, b, c, next, exp_n);
      end
      checks++;
      if (b_into_c_next !== exp_c) begin
        failures++;
        $display("FAIL b_into_c_next: state=%05b carry=%0b t_out=%0b S3=%0b got %0b exp %0b",
                 code, carry, to, c, b_into_c_next, exp_c);
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
