// Testbench of dac_serial with two behavioural AD5641 DACs that shift
// DATA_OUT in on falling CLOCK edges while SYNC is low and update on the
// rising edge of SYNC.  Checks: 16 bits per frame, two leading zeros, the
// 14-bit word received equals the one requested, CLOCK at 20 MHz, and one
// frame per request at a request period of 40 clocks (1 Msps).
module tb_dac_serial;
  localparam int N = 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][13:0] data = '0;
  logic dac_clk, sync_n, busy;
  logic [N-1:0] dout;
  logic [N-1:0][15:0] sh;
  logic [N-1:0][13:0] exp_q [$];
  int nbits = 0, n_frames = 0, checks = 0, failures = 0, cyc = 0;
  int last_rise = -1;

  dac_serial #(.NCH(N)) dut (.*);
  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  always @(posedge dac_clk) begin
    if (last_rise >= 0 && rst_n) check(cyc - last_rise == 2, "CLOCK is not half the board clock");
    last_rise = cyc;
  end
  always @(negedge dac_clk) if (!sync_n) begin
    for (int c = 0; c < N; c++) sh[c] = {sh[c][14:0], dout[c]};
    nbits++;
  end
  always @(negedge sync_n) nbits = 0;
  always @(posedge sync_n) if (rst_n) begin
    logic [N-1:0][13:0] e;
    check(nbits == 16, "frame is not 16 bits");
    check(exp_q.size() > 0, "frame without request");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      for (int c = 0; c < N; c++) begin
        check(sh[c][15:14] == 2'b00, "control bits are not zero");
        check(sh[c][13:0] == e[c], "wrong DAC word");
      end
    end
    n_frames++;
  end

  initial begin
    #1000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 40 * 30; i++) begin
      if (i % 40 == 0) begin
        for (int c = 0; c < N; c++) data[c] = 14'($urandom);
        exp_q.push_back(data);
        start = 1;
      end else start = 0;
      @(negedge clk);
    end
    start = 0;
    repeat (80) @(negedge clk);
    check(n_frames == 30, "not one frame per request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
