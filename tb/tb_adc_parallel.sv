// Testbench of adc_parallel with a behavioural AD7621 (parallel byte mode):
// the converter latches a new random word at each CONVERT_START falling edge
// and drives the upper byte while BYTE_SWAP is low, the lower byte while it
// is high, only while CHIP_SELECT is low.  Checks: every word read back
// equals the converted one; CHIP_SELECT falls no earlier than 18 clocks
// (450 ns) after CONVERT_START; with a request every 20 clocks the block
// delivers one word every 20 clocks (2 Msps at 40 MHz).
module tb_adc_parallel;
  logic clk = 0, rst_n = 0, start_n = 1;
  logic convst_n, cs_n, byte_swap, valid;
  logic [7:0] db;
  logic [15:0] data;
  int checks = 0, failures = 0;
  bit bb = 0;
  int cyc = 0, t_conv = 0, last_valid = -1, n_valid = 0;
  logic [15:0] conv_word, expected_q[$];

  adc_parallel dut (.*);
  always #12.5 clk = ~clk;   // 40 MHz
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // converter model
  always @(negedge convst_n) begin
    conv_word = 16'($urandom);
    expected_q.push_back(conv_word);
    t_conv = cyc;
  end
  always @(negedge cs_n) check(cyc - t_conv >= 18, "read before the 450 ns conversion time");
  assign db = cs_n ? 8'h00 : (byte_swap ? conv_word[7:0] : conv_word[15:8]);

  always @(negedge clk) if (valid) begin
    check(expected_q.size() > 0 && data == expected_q.pop_front(), "wrong word");
    if (bb && last_valid >= 0) check(cyc - last_valid == 20, "period is not 20 clocks");
    last_valid = cyc;
    n_valid++;
  end

  initial begin
    #100000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // single acquisitions with gaps
    repeat (5) begin
      start_n = 0; @(negedge clk); start_n = 1;
      repeat (30) @(negedge clk);
    end
    // back-to-back at 2 Msps
    n_valid = 0; last_valid = -1; bb = 1;
    for (int i = 0; i < 400; i++) begin
      start_n = !((i % 20) == 0);
      @(negedge clk);
    end
    start_n = 1;
    repeat (40) @(negedge clk);
    check(n_valid == 20, "not 20 words at 2 Msps");
    check(expected_q.size() == 0, "words converted but not read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
