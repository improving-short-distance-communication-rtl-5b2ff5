// tb_sols_a_logic: exhaustive self-checking test of the A(t) / not X leg.
//
// Applies all eight combinations of mode, X and B(t-1) and compares a_out
// with the coding rules written out independently: in FM0 the former half
// must differ from the previous later half; in Manchester the former half
// (CLK high) is X XOR 1. A watchdog ends the run if it ever stalls.
module tb_sols_a_logic;
  import sols_pkg::*;

  code_mode_e mode;
  logic       x, b_prev, a_out;
  int         checks = 0, failures = 0;

  sols_a_logic dut (.mode(mode), .x(x), .b_prev(b_prev), .a_out(a_out));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int i = 0; i < 8; i++) begin
      mode   = code_mode_e'(i[2]);
      x      = i[1];
      b_prev = i[0];
      #1;
      if (mode == MODE_FM0) expected = (b_prev == 1'b1) ? 1'b0 : 1'b1;  // rule 3: always change at the boundary
      else                  expected = (x == 1'b1) ? 1'b0 : 1'b1;       // X XOR CLK with CLK = 1
      checks++;
      if (a_out !== expected) begin
        failures++;
        $display("FAIL mode=%0d x=%0b b_prev=%0b a_out=%0b expected=%0b", mode, x, b_prev, a_out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
