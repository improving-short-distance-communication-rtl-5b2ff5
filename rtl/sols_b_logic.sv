// sols_b_logic: the "B(t) / X" leg of the SOLS FM0 / Manchester encoder.
//
// In FM0 the later-half value is B(t) = X XOR B(t-1): a 0 bit keeps B equal
// to B(t-1), which is the inverse of A(t), so the code word changes level
// mid-bit; a 1 bit makes B equal to A(t), so it holds. In Manchester the
// later half (CLK low) carries X XOR 0 = X. Reading X as X XOR 0 lets one
// XOR gate serve both codes: a 2:1 operand mux feeds it B(t-1) (FM0) or a
// constant 0 (Manchester). This is the second half of the SOLS
// balance logic-operation sharing.
//
// Interface: purely combinational, mode/x/b_prev in, b_out out. No clock.
// The structure (mux then one shared XOR) follows the published design;
// the mode polarity comes from sols_pkg.
module sols_b_logic
  import sols_pkg::*;
(
  input  code_mode_e mode,    // FM0 or Manchester
  input  logic       x,       // data bit X
  input  logic       b_prev,  // B(t-1), held in DFFB
  output logic       b_out    // B(t) in FM0, X in Manchester
);

  logic operand;

  // Operand mux ahead of the shared XOR.
  always_comb begin
    unique case (mode)
      MODE_FM0:        operand = b_prev;
      MODE_MANCHESTER: operand = 1'b0;
      default:         operand = b_prev;
    endcase
  end

  // The shared XOR.
  assign b_out = x ^ operand;

endmodule
