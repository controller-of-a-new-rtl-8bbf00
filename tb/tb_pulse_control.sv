// Testbench of pulse_control.  Drives the DSP handshake, the end-of-exchange
// strobes and a load-current sample, and checks the switch pattern of every
// state against the sequence of the document: standby, preparation (DSP
// calculation handshake, DATA_SELECT pairs 01, 10, 11 then 00), rise (S1, S2),
// flat-top (S2, S3, S4_ENABLE, BRIDGE_ENABLE, ACTIVE_REGULATION), fall (all
// off until the current has decayed).  The pulse timer is checked to the
// cycle: S2 stays closed Time_Pulse * TICK_CYCLES + 1 clocks.  A second pulse
// whose current never reaches the reference must end from the rise state
// without ever closing S3.
module tb_pulse_control;
  import megadiscap_pkg::*;
  localparam int TICK = 4;
  logic clk = 0, rst_n = 0;
  logic forewarning = 0, start = 0, end_dsp_calc = 0, xfer_done = 0;
  logic [1:0] xfer_pair = 0;
  sample_t i_load = -16'sd32063, i_reference = 16'sd5000;
  logic [15:0] time_pulse = 16'd100;
  logic begin_dsp_calc, s1_control, s2_control, s3_control, s4_enable, bridge_enable,
        active_regulation;
  logic [1:0] ds_pair;
  pulse_state_t state;
  int checks = 0, failures = 0, cyc = 0, s2_cycles = 0, s3_cycles = 0;
  bit ramp = 0;

  pulse_control #(.TICK_CYCLES(TICK)) dut (.*);
  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, msg); end
  endtask
  task automatic tick(int n = 1); repeat (n) @(negedge clk); endtask
  task automatic outs(input logic [6:0] e, input string msg);
    check({begin_dsp_calc, s1_control, s2_control, s3_control, s4_enable, bridge_enable,
           active_regulation} == e, msg);
  endtask
  task automatic exchange(input logic [1:0] p);
    xfer_pair = p; xfer_done = 1; tick(); xfer_done = 0; tick(3);
  endtask

  always @(negedge clk) if (rst_n) begin
    if (s2_control) s2_cycles++;
    if (s3_control) s3_cycles++;
    check(!(s1_control && s3_control), "S1 and S3 together");
    if (ramp && i_load < 16'sd30000) i_load <= i_load + 16'sd500;
  end

  task automatic prepare();
    forewarning = 1; tick(); forewarning = 0; tick();
    check(state == PS_CALC, "not in preparation after FOREWARNING");
    outs(7'b1000000, "BEGIN_DSP_CALC not raised");
    tick(20);
    outs(7'b1000000, "BEGIN_DSP_CALC dropped before END_DSP_CALC");
    end_dsp_calc = 1; tick(2);
    outs(7'b0000000, "BEGIN_DSP_CALC not dropped after END_DSP_CALC");
    check(ds_pair == 2'b00, "DATA_SELECT moved before END_DSP_CALC fell");
    end_dsp_calc = 0; tick(2);
    check(ds_pair == 2'b01, "DATA_SELECT not 01 after the calculation");
    exchange(2'b00);  // stale exchange, started before the pair changed
    check(ds_pair == 2'b01, "DATA_SELECT advanced on an exchange of another pair");
    exchange(2'b01); check(ds_pair == 2'b10, "DATA_SELECT not 10");
    exchange(2'b10); check(ds_pair == 2'b11, "DATA_SELECT not 11");
    exchange(2'b11); check(ds_pair == 2'b00, "DATA_SELECT not back to 00");
    check(state == PS_WAIT_START, "not waiting for START");
    forewarning = 1; tick(); forewarning = 0; tick();
    check(state == PS_WAIT_START, "FOREWARNING restarted the preparation");
  endtask

  initial begin
    #10000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(3); rst_n = 1; tick();
    check(state == PS_STANDBY, "not in standby after reset");
    outs(7'b0, "outputs not off in standby");
    start = 1; tick(); start = 0; tick();
    check(state == PS_STANDBY, "START accepted without FOREWARNING");

    // ---- pulse 1: complete pulse
    prepare();
    s2_cycles = 0; s3_cycles = 0;
    start = 1; tick(); start = 0;
    outs(7'b0110000, "rise pattern wrong (S1, S2)");
    ramp = 1;
    while (state == PS_RISE) tick();
    check(state == PS_FLAT, "rise did not end in flat-top");
    check(i_load >= i_reference, "flat-top before the reference was reached");
    tick();
    outs(7'b0011111, "flat-top pattern wrong");
    ramp = 0;
    while (state == PS_FLAT) tick();
    check(state == PS_FALL, "flat-top did not end in fall");
    tick();
    outs(7'b0, "fall pattern wrong (all off)");
    check(s2_cycles == 100 * TICK + 1, $sformatf("S2 closed %0d clocks", s2_cycles));
    check(s3_cycles > 0, "S3 never closed");
    tick(20);
    check(state == PS_FALL, "left fall before the current decayed");
    i_load = -16'sd32063; tick(2);
    check(state == PS_STANDBY, "not back to standby");

    // ---- pulse 2: current never reaches the reference
    prepare();
    s2_cycles = 0; s3_cycles = 0; time_pulse = 16'd30;
    start = 1; tick(); start = 0;
    while (state == PS_RISE) tick();
    check(state == PS_FALL, "rise timeout did not lead to fall");
    check(s3_cycles == 0, "S3 closed although the reference was not reached");
    check(s2_cycles == 30 * TICK + 1, $sformatf("S2 closed %0d clocks", s2_cycles));
    tick(2);
    check(state == PS_STANDBY, "not back to standby");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
