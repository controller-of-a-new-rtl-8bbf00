// Testbench of adc_serial with four behavioural AD7621 converters in serial
// read-after-convert mode: each latches a random word at CONVERT_START, puts
// its MSB on SERIAL_DATA when CHIP_SELECT falls and the next bit after each
// rising SERIAL_CLOCK edge.  Checks: the four words read back, exactly 16
// SERIAL_CLOCK pulses per frame, SERIAL_CLOCK only while CHIP_SELECT is low,
// conversion time of at least 18 clocks, and a request every 40 clocks
// (1 Msps) served every 40 clocks.
module tb_adc_serial;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, start_n = 1;
  logic convst_n, cs_n, sclk, valid;
  logic [N-1:0] sdata;
  logic [N-1:0][15:0] data;
  logic [N-1:0][15:0] word, sh, exp_words;
  int checks = 0, failures = 0;
  int cyc = 0, t_conv = 0, n_sclk = 0, n_valid = 0, last_valid = -1;

  adc_serial #(.NCH(N)) dut (.*);
  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  always @(negedge convst_n) begin
    for (int c = 0; c < N; c++) word[c] = 16'($urandom);
    exp_words = word;
    t_conv = cyc;
  end
  always @(negedge cs_n) begin
    check(cyc - t_conv >= 18, "read before the conversion time");
    sh = word; n_sclk = 0;
  end
  always @(posedge sclk) begin
    check(!cs_n, "SERIAL_CLOCK outside CHIP_SELECT");
    n_sclk <= n_sclk + 1;
    for (int c = 0; c < N; c++) sh[c] <= {sh[c][14:0], 1'b0};
  end
  always_comb for (int c = 0; c < N; c++) sdata[c] = sh[c][15];
  always @(posedge cs_n) if (rst_n) check(n_sclk == 16, "not 16 SERIAL_CLOCK pulses");

  always @(negedge clk) if (valid) begin
    check(data == exp_words, "wrong words");
    if (last_valid >= 0) check(cyc - last_valid == 40, "period is not 40 clocks");
    last_valid = cyc;
    n_valid++;
  end

  initial begin
    #1000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sh = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40 * 50; i++) begin
      start_n = !((i % 40) == 0);
      @(negedge clk);
    end
    start_n = 1;
    repeat (60) @(negedge clk);
    check(n_valid == 50, "not 50 acquisitions at 1 Msps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
