// sols_a_logic: the "A(t) / not X" leg of the SOLS FM0 / Manchester encoder.
//
// In FM0 every code word starts with a level change, so the former-half
// value A(t) is the inverse of the previous later-half value B(t-1). In
// Manchester the former half (CLK high) carries X XOR 1, the inverse of X.
// Both are one inversion, so a single inverter is shared and a 2:1 operand
// mux in front of it chooses B(t-1) (FM0) or X (Manchester). This is the
// balance logic-operation sharing of the SOLS architecture.
//
// Interface: purely combinational, mode/x/b_prev in, a_out out. No clock.
// The structure (mux then one inverter) follows the published design; the
// mode polarity comes from sols_pkg.
module sols_a_logic
  import sols_pkg::*;
(
  input  code_mode_e mode,    // FM0 or Manchester
  input  logic       x,       // data bit X
  input  logic       b_prev,  // B(t-1), held in DFFB
  output logic       a_out    // A(t) in FM0, not X in Manchester
);

  logic operand;

  // Operand mux ahead of the shared inverter.
  always_comb begin
    unique case (mode)
      MODE_FM0:        operand = b_prev;
      MODE_MANCHESTER: operand = x;
      default:         operand = b_prev;
    endcase
  end

  // The shared inverter.
  assign a_out = ~operand;

endmodule
