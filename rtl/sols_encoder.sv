// sols_encoder: fully reused FM0 / Manchester line encoder (SOLS architecture).
//
// FM0 and Manchester both split every bit period into a former half (CLK
// high) and a later half (CLK low) and both guarantee a level change inside
// each period, which keeps the line signal dc-balanced. This encoder builds
// both codes from the same four parts, so every part is in use whichever
// code is selected:
//
//   sols_a_logic  operand mux + shared inverter: A(t) = ~B(t-1)  or  ~X
//   sols_b_logic  operand mux + shared XOR:      B(t) = X ^ B(t-1) or X ^ 0
//   MUX-1         selected by CLK itself: former half -> A leg, later half
//                 -> B leg; its output is the line code
//   DFFB          the only flip-flop; at each rising CLK edge it stores the
//                 value MUX-1 carried in the later half just ended, B(t),
//                 which the next bit needs as B(t-1)
//
// FM0 needs only B(t-1) to form the next code word, so the second state
// flip-flop of a plain FM0 state machine is not needed (area-compact
// retiming). In Manchester mode the two legs give ~X and X, so MUX-1 outputs
// X XOR CLK.
//
// Interface and timing: X must be stable for a whole CLK period, from one
// rising edge to the next; its code word appears during that same period
// (no latency, one bit per CLK cycle). code_out is combinational in CLK,
// X, mode and DFFB, and toggles at up to twice the CLK rate. mode may change
// at a rising edge; the next bit is coded in the new mode, with FM0 resuming
// from whatever DFFB last stored. rst_n clears DFFB asynchronously.
//
// Follows the published design: the part list, the CLK-selected output mux,
// the single positive-edge DFFB, and the leg equations. Choices made here:
// the mode polarity (sols_pkg), an active-low asynchronous reset to
// B(t-1) = 1, and DFFB's D input taken from the B leg of MUX-1 rather than
// from the MUX-1 output. At the rising edge both carry the same value (CLK
// was low, so MUX-1 was passing the B leg); tapping the leg avoids a
// zero-delay race between CLK as mux select and CLK as flip-flop clock.
// Using CLK as a data signal is inherent to this architecture.
module sols_encoder
  import sols_pkg::*;
(
  input  logic       clk,      // CLK: bit clock and MUX-1 select
  input  logic       rst_n,    // asynchronous clear of DFFB, active low
  input  code_mode_e mode,     // FM0 or Manchester
  input  logic       x,        // data bit X, one per CLK period
  output logic       code_out  // line code
);

  // Value DFFB takes on reset. With B(t-1) = 1 the first FM0 code word
  // starts low, so a 0 bit right after reset codes as low-then-high.
  localparam logic B_RESET = 1'b1;

  logic b_prev;  // DFFB: B(t-1)
  logic a_leg;   // A(t) / not X
  logic b_leg;   // B(t) / X

  sols_a_logic u_a_logic (
    .mode   (mode),
    .x      (x),
    .b_prev (b_prev),
    .a_out  (a_leg)
  );

  sols_b_logic u_b_logic (
    .mode   (mode),
    .x      (x),
    .b_prev (b_prev),
    .b_out  (b_leg)
  );

  // MUX-1: former half (CLK high) passes A, later half (CLK low) passes B.
  assign code_out = clk ? a_leg : b_leg;

  // DFFB: positive-edge flip-flop holding B(t-1).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_prev <= B_RESET;
    else        b_prev <= b_leg;
  end

endmodule
