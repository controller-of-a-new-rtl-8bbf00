// End-to-end testbench of the MEGADISCAP controller FPGA at its default
// parameters (40 MHz clock, 2 Msps / 1 Msps acquisition, 200 kHz DSP link,
// 100 us and 10 us minimum switching periods for I1 and IF).
//
// Around the FPGA it places behavioural models of what the board connects:
// five AD7621 converters (one parallel, four serial), two AD5641 DACs, the
// DSP (calculation handshake, SPI slave, and an integral load-current
// controller standing in for Gc) and a first-order model of the power stage:
//   rise      : S1 and S2 closed, I1 ramps at 1.25 codes per clock;
//   flat-top  : I1 rises 0.15 codes per clock with S4 closed and falls as fast
//               with S4 open; IF rises or falls 0.5 codes per clock with the
//               bridge diagonals; the load current is I1 + IF;
//   fall      : I1 falls 2.5 codes per clock to zero, IF decays.
// Current and voltage samples use the ADC codes of the unipolar channels
// (zero at -32063), IF the bipolar one (zero at 0).
//
// Three pulses are run:
//   1. a 2.8 ms pulse (0.8 ms rise, 2 ms flat-top) with wide bands: normal
//      hysteresis operation; the load current must stay within 1 % of the
//      reference over the second half of the flat-top and the pulse must
//      last Time_Pulse to within a few clocks;
//   2. a short pulse with narrow bands: both frequency limiters engage, and
//      the I1 and IF switching periods must never beat their limits;
//   3. a pulse whose Time_Pulse ends before the current reaches the
//      reference: it must fall from the rise state without closing S3.
// Each mechanism (handshake, parameter pairs, rise, flat-top, fall, rise
// timeout, S4 and bridge commutations, both limiters, ADC, DAC and DSP
// frames) is counted and a mechanism that never happened is a failure; the
// converter and DSP frame counts are checked against the 2 Msps, 1 Msps and
// 200 kHz rates.
module tb_megadiscap_fpga;
  import megadiscap_pkg::*;

  localparam int ZERO = -32063;          // unipolar channel code at 0 V
  localparam int IREF_VAL = 40000;       // flat-top current above zero, in codes

  logic clk = 0, rst_n = 0, forewarning = 0, start = 0;
  logic adcp_convst_n, adcp_cs_n, adcp_byte_swap;
  logic [7:0] adcp_db;
  logic adcs_convst_n, adcs_cs_n, adcs_sclk;
  logic [3:0] adcs_sdata;
  logic dac_clk, dac_sync_n;
  logic [1:0] dac_dout;
  logic begin_dsp_calc, end_dsp_calc = 0, active_regulation;
  logic [2:0] data_select;
  logic spi_ste_n, spi_clk, spi_simo, spi_somi;
  logic s1_control, s2_control, s3_control, s4_gate, bridge_pos, bridge_neg;
  pulse_state_t state;
  logic if_limited, i1_limited;

  megadiscap_fpga dut (.*);

  always #12.5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0d: %s", cyc, msg); end
  endtask
  task automatic tick(int n = 1); repeat (n) @(negedge clk); endtask

  // ------------------------------------------------------------ plant
  real i1 = 0.0, i_f = 0.0, il = 0.0;
  always @(posedge clk) begin
    if (s1_control && s2_control)      i1 = i1 + 1.25;
    else if (s2_control && s3_control) i1 = i1 + (s4_gate ? 0.15 : -0.15);
    else if (s2_control)               i1 = i1;
    else                               i1 = (i1 > 2.5) ? i1 - 2.5 : 0.0;
    if (bridge_pos)      i_f = i_f + 0.5;
    else if (bridge_neg) i_f = i_f - 0.5;
    else                 i_f = i_f * 0.99;
    il = s3_control ? i1 + i_f : i1;
  end

  function automatic logic [15:0] code(real v, int zero);
    int c = zero + int'(v);
    if (c > 32767) c = 32767;
    if (c < -32768) c = -32768;
    return 16'(c);
  endfunction

  // ------------------------------------------------------------ ADC models
  logic [15:0] par_word;
  int n_adc_par = 0, n_adc_ser = 0;
  always @(negedge adcp_convst_n) begin par_word = code(i_f, 0); n_adc_par++; end
  assign adcp_db = adcp_cs_n ? 8'h00 : (adcp_byte_swap ? par_word[7:0] : par_word[15:8]);

  logic [3:0][15:0] ser_word, ser_sh;
  always @(negedge adcs_convst_n) begin
    ser_word[0] = code(i1, ZERO);
    ser_word[1] = code(il, ZERO);
    ser_word[2] = code(il * 0.05, ZERO);
    ser_word[3] = 16'h0000;
    n_adc_ser++;
  end
  always @(negedge adcs_cs_n) ser_sh = ser_word;
  always @(posedge adcs_sclk) for (int c = 0; c < 4; c++) ser_sh[c] <= {ser_sh[c][14:0], 1'b0};
  always_comb for (int c = 0; c < 4; c++) adcs_sdata[c] = ser_sh[c][15];

  // ------------------------------------------------------------ DAC models
  logic [1:0][15:0] dac_sh;
  int dac_bits = 0, n_dac = 0;
  always @(negedge dac_sync_n) dac_bits = 0;
  always @(negedge dac_clk) if (!dac_sync_n) begin
    for (int c = 0; c < 2; c++) dac_sh[c] = {dac_sh[c][14:0], dac_dout[c]};
    dac_bits++;
  end
  always @(posedge dac_sync_n) if (rst_n && cyc > 10) begin
    check(dac_bits == 16 && dac_sh[0][15:14] == 2'b00 && dac_sh[1][15:14] == 2'b00,
          "malformed DAC frame");
    n_dac++;
  end

  // ------------------------------------------------------------ DSP model
  logic [15:0] p_time, p_if_max, p_if_min, p_i1_max, p_i1_min, damping;
  real reg_out = 0.0;
  logic [15:0] tx0, tx1, rx0, rx1;
  logic [2:0] ds_at_start;
  int nbits_last, nframes;
  int n_frames_pair [4] = '{0, 0, 0, 0};

  always_comb begin
    unique case (data_select[2:1])
      2'b00: begin tx0 = 16'($rtoi(reg_out)); tx1 = damping; end
      2'b01: begin tx0 = code(IREF_VAL, ZERO); tx1 = p_time; end
      2'b10: begin tx0 = p_if_max; tx1 = p_if_min; end
      default: begin tx0 = p_i1_max; tx1 = p_i1_min; end
    endcase
  end

  dsp_spi_slave dsp (.ste_n(spi_ste_n), .sclk(spi_clk), .simo(spi_simo), .somi(spi_somi),
    .data_select, .tx0, .tx1, .rx0, .rx1, .ds_at_start, .nbits_last, .nframes);

  // Controller: integral action on the load-current error, reset outside
  // regulation (as the DSP flowchart resets its controller).
  always @(posedge spi_ste_n) if (rst_n) begin
    #2;
    n_frames_pair[ds_at_start[2:1]]++;
    check(nbits_last == 32, "DSP frame not 32 bits");
    if (active_regulation)
      reg_out = reg_out + 0.25 * real'(int'(code(IREF_VAL, ZERO)) - int'($signed(rx0)));
    else
      reg_out = 0.0;
    if (reg_out > 30000.0) reg_out = 30000.0;
    if (reg_out < -30000.0) reg_out = -30000.0;
  end

  // Calculation handshake.
  int n_handshake = 0;
  always @(posedge begin_dsp_calc) begin
    tick(100);
    end_dsp_calc = 1;
    while (begin_dsp_calc) tick();
    tick(10);
    end_dsp_calc = 0;
    n_handshake++;
  end

  // ------------------------------------------------------------ monitors
  int n_rise = 0, n_flat = 0, n_fall = 0, n_timeout = 0;
  int n_s4 = 0, n_bridge = 0, n_i1_lim = 0, n_if_lim = 0;
  int last_s4_on = -1, last_br_pos = -1, min_s4_period = 1 << 30, min_br_period = 1 << 30;
  logic s4_q = 0, bp_q = 0;
  pulse_state_t st_q = PS_STANDBY;
  bit in_flat_window = 0;
  int flat_cyc = 0;
  real max_err = 0.0;

  always @(negedge clk) if (rst_n) begin
    check(!(s1_control && s3_control), "S1 and S3 closed together");
    check(!(bridge_pos && bridge_neg), "bridge shoot-through");
    if (state != st_q) begin
      if (state == PS_RISE) n_rise++;
      if (state == PS_FLAT) n_flat++;
      if (state == PS_FALL) begin
        n_fall++;
        if (st_q == PS_RISE) n_timeout++;
      end
    end
    flat_cyc = (state == PS_FLAT) ? flat_cyc + 1 : 0;
    // edges in the first cycles of the flat-top are the turn-on, not commutations
    if (s4_gate && !s4_q && flat_cyc > 3) begin
      n_s4++;
      if (last_s4_on >= 0 && int'(cyc) - last_s4_on < min_s4_period) min_s4_period = int'(cyc) - last_s4_on;
      last_s4_on = int'(cyc);
    end
    if (bridge_pos && !bp_q && flat_cyc > 3) begin
      n_bridge++;
      if (last_br_pos >= 0 && int'(cyc) - last_br_pos < min_br_period) min_br_period = int'(cyc) - last_br_pos;
      last_br_pos = int'(cyc);
    end
    if (state != PS_FLAT) begin last_s4_on = -1; last_br_pos = -1; end
    if (i1_limited) n_i1_lim++;
    if (if_limited) n_if_lim++;
    if (in_flat_window) begin
      real e;
      e = il - real'(IREF_VAL);
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
    end
    s4_q = s4_gate; bp_q = bridge_pos; st_q = state;
  end

  // ------------------------------------------------------------ pulses
  task automatic run_pulse(input int tp_us, input int i1_band, input int if_band,
                           output int start_cyc, output int s2_off_cyc);
    p_time = 16'(tp_us);
    p_i1_max = 16'(i1_band);  p_i1_min = 16'(-i1_band);
    p_if_max = 16'(if_band);  p_if_min = 16'(-if_band);
    forewarning = 1; tick(4); forewarning = 0;
    while (state != PS_WAIT_START) tick();
    check(dut.regs.i_reference == code(IREF_VAL, ZERO), "I_Reference not loaded");
    check(dut.regs.time_pulse == p_time, "Time_Pulse not loaded");
    check(dut.regs.hys_if_max == p_if_max && dut.regs.hys_if_min == p_if_min, "IF band not loaded");
    check(dut.regs.hys_i1_max == p_i1_max && dut.regs.hys_i1_min == p_i1_min, "I1 band not loaded");
    tick(500);
    start = 1; start_cyc = int'(cyc); tick(4); start = 0;
    while (!s2_control) tick();
    while (s2_control) tick();
    s2_off_cyc = int'(cyc);
    while (state != PS_STANDBY) tick();
    tick(1000);
  endtask

  initial begin
    #40ms $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, len;
    damping = 16'sd33;   // about 0.001 in Q0.15
    p_time = 0; p_if_max = 0; p_if_min = 0; p_i1_max = 0; p_i1_min = 0;
    tick(5); rst_n = 1; tick(50);

    // ---- pulse 1: 0.8 ms rise + 2 ms flat-top, normal hysteresis
    fork
      run_pulse(2800, 300, 100, t0, t1);
      begin
        while (state != PS_FLAT) tick();
        tick(40000);            // second half of the 2 ms flat-top
        in_flat_window = 1;
        while (state == PS_FLAT) tick();
        in_flat_window = 0;
      end
    join
    len = t1 - t0;
    check(len >= 2800 * 40 && len <= 2800 * 40 + 10, $sformatf("pulse 1 lasted %0d clocks", len));
    check(max_err < 0.01 * IREF_VAL, $sformatf("flat-top error %f codes", max_err));
    check(n_i1_lim == 0 && n_if_lim == 0, "limiter engaged with wide bands");
    check(min_s4_period >= 4000, $sformatf("I1 switching period %0d", min_s4_period));
    check(min_br_period >= 400, $sformatf("IF switching period %0d", min_br_period));
    $display("pulse 1: %0d clocks, flat-top error %0.1f codes, S4 %0d, bridge %0d commutations",
             len, max_err, n_s4, n_bridge);

    // ---- pulse 2: narrow bands, frequency limitation
    min_s4_period = 1 << 30; min_br_period = 1 << 30;
    run_pulse(1200, 50, 10, t0, t1);
    check(n_i1_lim > 0, "I1 limiter never engaged");
    check(n_if_lim > 0, "IF limiter never engaged");
    check(min_s4_period >= 4000, $sformatf("I1 switching period %0d under limit", min_s4_period));
    check(min_br_period >= 400, $sformatf("IF switching period %0d under limit", min_br_period));

    // ---- pulse 3: Time_Pulse shorter than the rise
    run_pulse(300, 300, 100, t0, t1);
    check(n_timeout == 1, "rise timeout not seen exactly once");
    check(n_flat == 2, "flat-top count");

    $display("mechanisms: handshake %0d, pairs 01/10/11/00 %0d/%0d/%0d/%0d, rise %0d, flat %0d, fall %0d, timeout %0d",
             n_handshake, n_frames_pair[1], n_frames_pair[2], n_frames_pair[3], n_frames_pair[0],
             n_rise, n_flat, n_fall, n_timeout);
    $display("            S4 %0d, bridge %0d, I1 limited %0d, IF limited %0d, ADC par %0d ser %0d, DAC %0d",
             n_s4, n_bridge, n_i1_lim, n_if_lim, n_adc_par, n_adc_ser, n_dac);
    check(n_handshake == 3, "calculation handshake count");
    check(n_frames_pair[1] >= 3 && n_frames_pair[2] >= 3 && n_frames_pair[3] >= 3, "parameter pairs not read");
    check(n_frames_pair[0] > 100, "regulation exchanges");
    check(n_rise == 3 && n_fall == 3, "rise/fall count");
    check(n_s4 > 0 && n_bridge > 0, "no commutation");
    check(n_adc_par > 0 && n_adc_ser > 0 && n_dac > 0, "converter frames");
    // rates: 2 Msps, 1 Msps, 1 Msps and 200 kHz at 40 MHz
    check(n_adc_par >= int'(cyc) / 20 - 2 && n_adc_par <= int'(cyc) / 20 + 1, "parallel ADC not at 2 Msps");
    check(n_adc_ser >= int'(cyc) / 40 - 2 && n_adc_ser <= int'(cyc) / 40 + 1, "serial ADCs not at 1 Msps");
    check(n_dac >= int'(cyc) / 40 - 3 && n_dac <= int'(cyc) / 40 + 1, "DACs not at 1 Msps");
    check(nframes >= int'(cyc) / 200 - 2 && nframes <= int'(cyc) / 200 + 1, "DSP link not at 200 kHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
