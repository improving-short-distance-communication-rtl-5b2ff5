// tb_sols_b_logic: exhaustive self-checking test of the B(t) / X leg.
//
// Applies all eight combinations of mode, X and B(t-1). The expected later
// half is worked out from the coding rules: in FM0 the former half is the
// inverse of B(t-1); a 0 bit must change level mid-bit and a 1 bit must
// not. In Manchester the later half (CLK low) is X XOR 0.
module tb_sols_b_logic;
  import sols_pkg::*;

  code_mode_e mode;
  logic       x, b_prev, b_out;
  int         checks = 0, failures = 0;

  sols_b_logic dut (.mode(mode), .x(x), .b_prev(b_prev), .b_out(b_out));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic former, expected;
    for (int i = 0; i < 8; i++) begin
      mode   = code_mode_e'(i[2]);
      x      = i[1];
      b_prev = i[0];
      #1;
      if (mode == MODE_FM0) begin
        former   = !b_prev;
        expected = x ? former : !former;  // rule 2 (hold) / rule 1 (change)
      end else begin
        expected = x;                     // X XOR CLK with CLK = 0
      end
      checks++;
      if (b_out !== expected) begin
        failures++;
        $display("FAIL mode=%0d x=%0b b_prev=%0b b_out=%0b expected=%0b", mode, x, b_prev, b_out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
