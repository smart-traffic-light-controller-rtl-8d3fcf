// tb_tl_output_logic: exhaustive test of the controller's output decode.
//
// Applies all 32 state codes with b_into_c low and high. The expected
// colours, tEn and tsel are derived from the fields of the state code
// (bits [4:3] phase, bit 0 load/wait, bits [2:1] period or yellow), a
// different route from the case table in the design. Codes that name no
// state must give all red with tEn low.
module tb_tl_output_logic;
  import tl_pkg::*;

  state_t  state;
  logic    b_into_c;
  lights_t lights;
  logic    ten;
  tsel_t   tsel;

  int checks = 0;
  int failures = 0;

  tl_output_logic dut (.*);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s state=%05b carry=%0b got=%0h exp=%0h", what, state, b_into_c, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 64; n++) begin
      automatic logic [4:0] code = 5'(n >> 1);
      automatic logic       carry = n[0];
      automatic logic [1:0] ph = code[4:3];
      automatic logic [2:0] st = code[2:0];
      automatic bit         valid_run = (ph == 2'b00) || (ph == 2'b01) || (ph == 2'b10 && st[2]);
      automatic light_t     col = (st[2:1] == 2'b11) ? YELLOW : GREEN;
      automatic lights_t    exp_l = {8{RED}};
      automatic logic       exp_ten = valid_run && !st[0];
      automatic tsel_t      exp_tsel = TSEL_3;

      if (valid_run) begin
        case (ph)
          2'b00: begin exp_l[0] = col; exp_l[4] = col; end
          2'b01: begin
            exp_l[3] = col; exp_l[7] = col;
            exp_l[1] = (carry && col == YELLOW) ? GREEN : col;
            exp_l[5] = exp_l[1];
          end
          default: begin
            exp_l[2] = col; exp_l[6] = col;
            exp_l[1] = carry ? col : RED;
            exp_l[5] = exp_l[1];
          end
        endcase
        if (col == GREEN)
          exp_tsel = (ph == 2'b10) ? TSEL_15 :
                     (st[2:1] == 2'b00) ? TSEL_20 :
                     (st[2:1] == 2'b01) ? TSEL_40 : TSEL_60;
      end

      state = state_t'(code);
      b_into_c = carry;
      #1;
      expect_eq(32'(lights), 32'(exp_l), "lights");
      expect_eq(32'(ten), 32'(exp_ten), "tEn");
      if (valid_run) expect_eq(32'(tsel), 32'(exp_tsel), "tsel");
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
