// tb_sols_encoder: end-to-end self-checking test of the FM0 / Manchester encoder.
//
// The encoder has no parameters, so this runs the design at its only size.
// A 10-time-unit clock runs freely. Each data bit is applied 1 unit after a
// rising edge and held for one period; code_out is sampled 3 units into the
// former half (CLK high) and 3 units into the later half (CLK low). The
// expected half-bits come from a reference written from the coding rules,
// not from the encoder's equations:
//   FM0        the former half always differs from the previous later half;
//              a 0 bit changes level mid-bit, a 1 bit holds it
//   Manchester former half = X XOR 1, later half = X XOR 0
// Beyond the half-bit compare it decodes every word back to X, checks that
// every Manchester word has a mid-bit change, that the FM0 running disparity
// stays within +/-2 (dc-balance), and that exactly one bit is coded per
// clock cycle with no latency. Directed sequences replay the worked FM0
// example (0 then 1 after reset gives 01, 00) and the Manchester example
// 0,1,1,0,1. A random stream then switches mode and pulses the reset at
// random. Each mechanism (FM0 mid-bit change, FM0 hold, Manchester bit,
// both mode switches, reset mid-stream) is counted, and one that never
// occurred counts as a failure.
module tb_sols_encoder;
  import sols_pkg::*;

  localparam int RANDOM_BITS = 4000;

  logic       clk = 1'b0;
  logic       rst_n;
  code_mode_e mode;
  logic       x;
  logic       code_out;

  int checks = 0, failures = 0;

  // Reference state: the level of the previous later half.
  logic ref_prev;
  int   disparity;
  code_mode_e last_mode;

  // Mechanism counters.
  int n_fm0_change = 0, n_fm0_hold = 0, n_manchester = 0;
  int n_to_manchester = 0, n_to_fm0 = 0, n_reset = 0;
  int n_bits = 0, n_edges = 0;

  sols_encoder dut (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (mode),
    .x        (x),
    .code_out (code_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) n_edges <= n_edges + 1;

  initial begin
    #((RANDOM_BITS + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  // Code one bit and check both halves. Timing within the period that
  // starts at a rising edge T: inputs change at T+1, an optional reset pulse
  // is low from T+1 to T+2, the former half is sampled at T+3 and the later
  // half at T+8.
  task automatic code_bit(input code_mode_e m, input logic xb, input logic pulse_reset,
                          output logic got_a, output logic got_b);
    logic exp_a, exp_b;
    @(posedge clk);
    #1;
    mode = m;
    x    = xb;
    if (pulse_reset) begin
      rst_n     = 1'b0;
      ref_prev  = 1'b1;
      disparity = 0;
      n_reset++;
    end
    #1 rst_n = 1'b1;
    if (m != last_mode) begin
      if (m == MODE_MANCHESTER) n_to_manchester++;
      else begin
        n_to_fm0++;
        disparity = 0;  // the dc-balance bound applies to an unbroken FM0 run
      end
    end
    last_mode = m;

    if (m == MODE_FM0) begin
      exp_a = !ref_prev;                // rule 3: change at every word boundary
      exp_b = xb ? exp_a : !exp_a;      // rule 2 hold / rule 1 change
      if (xb) n_fm0_hold++; else n_fm0_change++;
    end else begin
      exp_a = (xb == 1'b0);             // CLK high: X XOR 1
      exp_b = (xb == 1'b1);             // CLK low:  X XOR 0
      n_manchester++;
    end

    #1;
    check(clk, 1'b1, "sampling phase (former half)");
    got_a = code_out;
    check(got_a, exp_a, (m == MODE_FM0) ? "FM0 former half" : "Manchester former half");
    #5;
    check(clk, 1'b0, "sampling phase (later half)");
    got_b = code_out;
    check(got_b, exp_b, (m == MODE_FM0) ? "FM0 later half" : "Manchester later half");

    // Decode the word back to X.
    if (m == MODE_FM0) begin
      check((got_a == got_b), xb, "FM0 decode");
      disparity += (got_a ? 1 : -1) + (got_b ? 1 : -1);
      checks++;
      if (disparity > 2 || disparity < -2) begin
        failures++;
        $display("FAIL t=%0t FM0 running disparity %0d", $time, disparity);
      end
    end else begin
      check(got_b, xb, "Manchester decode");
      check((got_a != got_b), 1'b1, "Manchester mid-bit change");
    end
    ref_prev = exp_b;
    n_bits++;
  endtask

  logic a, b;
  int   edges_at_start;

  initial begin
    rst_n     = 1'b1;
    mode      = MODE_FM0;
    last_mode = MODE_FM0;
    x         = 1'b0;
    ref_prev  = 1'b1;
    disparity = 0;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;

    // Worked FM0 example: after reset, X = 0 gives 0 then 1, X = 1 gives 0, 0.
    code_bit(MODE_FM0, 1'b0, 1'b0, a, b);
    check(a, 1'b0, "FM0 example bit 1 A"); check(b, 1'b1, "FM0 example bit 1 B");
    code_bit(MODE_FM0, 1'b1, 1'b0, a, b);
    check(a, 1'b0, "FM0 example bit 2 A"); check(b, 1'b0, "FM0 example bit 2 B");

    // Manchester example: X = 0,1,1,0,1 gives 10, 01, 01, 10, 01.
    begin
      automatic logic [4:0] xs = 5'b10110;        // bit 0 is sent first
      automatic logic [9:0] want = 10'b01_10_01_01_10;
      for (int i = 0; i < 5; i++) begin
        code_bit(MODE_MANCHESTER, xs[i], 1'b0, a, b);
        check(a, want[2*i+1], "Manchester example A");
        check(b, want[2*i],   "Manchester example B");
      end
    end

    // Random stream: one bit per clock, random mode switches and resets.
    edges_at_start = n_edges;
    begin
      automatic code_mode_e m = MODE_FM0;
      for (int i = 0; i < RANDOM_BITS; i++) begin
        if ($urandom_range(15) == 0) m = (m == MODE_FM0) ? MODE_MANCHESTER : MODE_FM0;
        code_bit(m, 1'($urandom_range(1)), ($urandom_range(199) == 0), a, b);
      end
    end
    // Throughput: exactly RANDOM_BITS clock edges for RANDOM_BITS bits.
    check((n_edges - edges_at_start) == RANDOM_BITS, 1'b1, "one bit per clock cycle");

    $display("mechanisms: fm0_change=%0d fm0_hold=%0d manchester=%0d to_manchester=%0d to_fm0=%0d reset=%0d bits=%0d",
             n_fm0_change, n_fm0_hold, n_manchester, n_to_manchester, n_to_fm0, n_reset, n_bits);
    check(n_fm0_change    > 0, 1'b1, "FM0 mid-bit change exercised");
    check(n_fm0_hold      > 0, 1'b1, "FM0 hold exercised");
    check(n_manchester    > 0, 1'b1, "Manchester exercised");
    check(n_to_manchester > 0, 1'b1, "switch to Manchester exercised");
    check(n_to_fm0        > 0, 1'b1, "switch to FM0 exercised");
    check(n_reset         > 0, 1'b1, "reset mid-stream exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
