// Testbench of spi_dsp_control against the behavioural DSP SPI slave.  Each
// exchange uses a random DATA_SELECT pair and random words both ways.
// Checks: words received on both sides, DATA_SELECT seen by the DSP at the
// start of the frame, rx_sel of each received word (pair and word index),
// done_pair, 32 SPI_CLOCK pulses, and that an exchange fits in the 200-clock
// (200 kHz) period, leaving the link idle before the next request.
module tb_spi_dsp_control;
  logic clk = 0, rst_n = 0, start_n = 1;
  logic [1:0] ds_pair_in = 0;
  logic [15:0] tx_data, rx_data;
  logic word_sel, spi_ste_n, spi_clk, spi_simo, spi_somi, rx_valid, done, snap;
  logic [2:0] data_select, rx_sel;
  logic [1:0] done_pair, pair_exp;
  logic [15:0] a, b, c, d, dsp_rx0, dsp_rx1;
  logic [2:0] ds_at_start;
  int nbits_last, nframes;
  int f0 = 0;
  int checks = 0, failures = 0, cyc = 0, nrx = 0, t_start = 0;

  spi_dsp_control dut (.*);
  dsp_spi_slave dsp (.ste_n(spi_ste_n), .sclk(spi_clk), .simo(spi_simo), .somi(spi_somi),
    .data_select, .tx0(c), .tx1(d), .rx0(dsp_rx0), .rx1(dsp_rx1), .ds_at_start,
    .nbits_last, .nframes);

  assign tx_data = word_sel ? b : a;
  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  always @(negedge clk) if (rx_valid) begin
    check(rx_data == (nrx == 0 ? c : d), "FPGA received wrong word");
    check(rx_sel == {pair_exp, nrx[0]}, "wrong rx_sel");
    nrx++;
  end

  initial begin
    #10000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); f0 = nframes;
    for (int n = 0; n < 40; n++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom);
      ds_pair_in = 2'($urandom); pair_exp = ds_pair_in; nrx = 0;
      start_n = 0; t_start = cyc; @(negedge clk); start_n = 1;
      ds_pair_in = 2'($urandom);  // must not matter after the start
      while (!done) @(negedge clk);
      check(cyc - t_start < 200, "exchange longer than 200 clocks");
      @(negedge clk);
      check(dsp_rx0 == a && dsp_rx1 == b, "DSP received wrong words");
      check(nbits_last == 32, "not 32 SPI clock pulses");
      check(nrx == 2, "not two received words");
      check(ds_at_start[0] == 1'b0, "DATA_SELECT(0) not 0 at frame start");
      check(spi_ste_n && !spi_clk, "link not idle after exchange");
      check(ds_at_start[2:1] == pair_exp, "DATA_SELECT pair seen by the DSP");
      check(done_pair == pair_exp, "done_pair differs from the requested pair");
      repeat (200 - (cyc - t_start)) @(negedge clk);
    end
    check(nframes - f0 == 40, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
