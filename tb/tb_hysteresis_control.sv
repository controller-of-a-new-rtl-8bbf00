// Testbench of hysteresis_control.  A simple plant integrates the current
// (rising by UP_SLOPE per clock while `pos` is high, falling otherwise) and a
// reference model in the testbench, written from the band rule and the
// minimum-period rule (a commutation at an edge is allowed only MIN_PERIOD
// clocks after the previous one at that edge), predicts `pos` every cycle.
// Phase 1: slow slopes, the plain hysteresis regime, no limitation expected.
// Phase 2: steep slopes, the frequency-limited regime: commutations at one
// edge must be at least MIN_PERIOD clocks apart and the current overshoots
// the band.  Phase 3: disabled, both outputs low.
module tb_hysteresis_control;
  import megadiscap_pkg::*;
  localparam int P = 40;
  logic clk = 0, rst_n = 0, enable = 0;
  sample_t ref_i = 16'sd1000, meas = 16'sd950, band_hi = 16'sd100, band_lo = -16'sd100;
  logic pos, neg, limited, commutation;
  int checks = 0, failures = 0;
  int slope;
  int cyc = 0;
  // reference model state
  logic m_up, m_pos = 0, m_neg = 0; int last_hi = -100000, last_lo = -100000;
  int n_comm = 0, n_limited = 0, max_over = 0;

  hysteresis_control #(.MIN_PERIOD(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // Model: evaluated with the same pre-edge values the DUT sees.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!enable) m_up = (meas < ref_i);
    else if (m_up && int'(meas) >= int'(ref_i) + int'(band_hi)) begin
      if (cyc - last_hi >= P) begin m_up = 0; last_hi = cyc; end
    end else if (!m_up && int'(meas) <= int'(ref_i) + int'(band_lo)) begin
      if (cyc - last_lo >= P) begin m_up = 1; last_lo = cyc; end
    end
    m_pos = enable && m_up;
    m_neg = enable && !m_up;
  end

  // Plant and comparison on the falling edge.
  always @(negedge clk) if (rst_n) begin
    check(pos == m_pos && neg == m_neg, "output differs from model");
    if (commutation) n_comm++;
    if (limited) n_limited++;
    if (enable) begin
      meas <= meas + (pos ? slope : -slope);
      if (int'(meas) - 1100 > max_over) max_over = int'(meas) - 1100;
    end
  end

  initial begin
    #100000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slope = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1;
    repeat (2000) @(negedge clk);
    check(n_comm >= 8, "too few commutations in normal regime");
    check(n_limited == 0, "limitation in normal regime");
    check(max_over <= 2, "overshoot in normal regime");
    // steep slope: band crossed in 200/20 = 10 clocks, a cycle of 20 < P
    slope = 20; n_comm = 0; max_over = 0;
    repeat (2000) @(negedge clk);
    check(n_comm >= 20, "too few commutations in limited regime");
    check(n_limited > 0, "limitation never engaged");
    check(max_over > 50, "no overshoot in limited regime");
    // max commutation rate: one per P at each edge -> <= 2 per P overall
    check(n_comm <= 2 * (2000 / P) + 2, "commutations exceed limit");
    enable = 0;
    repeat (3) @(negedge clk);
    check(!pos && !neg, "outputs not off when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
