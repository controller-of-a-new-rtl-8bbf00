// FPGA of the MEGADISCAP pulsed current source controller.
//
// The converter makes trapezoidal current pulses in a magnet: a high-voltage
// capacitor stage (S1, S2) ramps the current, a 10 kHz one-quadrant generator
// (S4, current I1) carries the mean flat-top current, and a 100 kHz full-bridge
// active filter (current IF) in parallel with a capacitor C cancels the I1
// ripple and regulates the load current.  This FPGA, clocked at 40 MHz, does
// everything fast: it sequences the pulse, runs both hysteresis current
// controls, computes the active filter reference, reads the five ADCs, writes
// the two test DACs and exchanges data with the DSP, which only runs the
// slow load-current controller (200 kHz) and computes pulse parameters.
//
// Acquisition: IF on the parallel ADC every 20 clocks (2 Msps); I1, IL, Vc and
// a spare channel on the four serial ADCs every 40 clocks (1 Msps).  DSP
// exchange every 200 clocks (200 kHz): two words each way.  DACs every 40
// clocks: DAC 0 shows the IF reference, DAC 1 the load current.
//
// Ports: FOREWARNING/START from the control CPU and END_DSP_CALC from the DSP
// are asynchronous and pass through two-flop synchronizers (two clocks of
// delay).  Switch commands s1_control..s3_control and the gates s4_gate,
// bridge_pos/bridge_neg are registered.  Channel assignment of the serial
// ADCs and the DAC test signals are this design's choice; the blocks, rates
// and the DSP protocol follow the document.
module megadiscap_fpga
  import megadiscap_pkg::*;
#(
  parameter int unsigned ADC_PAR_PERIOD = 20,
  parameter int unsigned ADC_SER_PERIOD = 40,
  parameter int unsigned DSP_PERIOD     = 200,
  parameter int unsigned IF_MIN_PERIOD  = 400,
  parameter int unsigned I1_MIN_PERIOD  = 4000,
  parameter int unsigned TICK_CYCLES    = CLK_MHZ
) (
  input  logic        clk,
  input  logic        rst_n,
  // control CPU
  input  logic        forewarning,
  input  logic        start,
  // parallel ADC (IF)
  output logic        adcp_convst_n,
  output logic        adcp_cs_n,
  output logic        adcp_byte_swap,
  input  logic [7:0]  adcp_db,
  // serial ADCs (0: I1, 1: IL, 2: Vc, 3: spare)
  output logic        adcs_convst_n,
  output logic        adcs_cs_n,
  output logic        adcs_sclk,
  input  logic [3:0]  adcs_sdata,
  // test DACs
  output logic        dac_clk,
  output logic        dac_sync_n,
  output logic [1:0]  dac_dout,
  // DSP
  output logic        begin_dsp_calc,
  input  logic        end_dsp_calc,
  output logic        active_regulation,
  output logic [2:0]  data_select,
  output logic        spi_ste_n,
  output logic        spi_clk,
  output logic        spi_simo,
  input  logic        spi_somi,
  // power stage
  output logic        s1_control,
  output logic        s2_control,
  output logic        s3_control,
  output logic        s4_gate,
  output logic        bridge_pos,
  output logic        bridge_neg,
  // status
  output pulse_state_t state,
  output logic        if_limited,
  output logic        i1_limited
);

  logic forewarning_s, start_s, end_calc_s;
  sync_2ff u_sync_fw  (.clk, .rst_n, .d(forewarning),  .q(forewarning_s));
  sync_2ff u_sync_st  (.clk, .rst_n, .d(start),        .q(start_s));
  sync_2ff u_sync_end (.clk, .rst_n, .d(end_dsp_calc), .q(end_calc_s));

  logic tick_par, tick_ser, tick_dsp;
  tick_gen #(.PERIOD(ADC_PAR_PERIOD)) u_tick_par (.clk, .rst_n, .tick(tick_par));
  tick_gen #(.PERIOD(ADC_SER_PERIOD)) u_tick_ser (.clk, .rst_n, .tick(tick_ser));
  tick_gen #(.PERIOD(DSP_PERIOD))     u_tick_dsp (.clk, .rst_n, .tick(tick_dsp));

  // ---------------------------------------------------------------- ADCs
  logic [15:0]       if_word;
  logic              if_valid;
  logic [3:0][15:0]  ser_words;
  logic              ser_valid;

  adc_parallel u_adc_par (
    .clk, .rst_n, .start_n(!tick_par),
    .convst_n(adcp_convst_n), .cs_n(adcp_cs_n), .byte_swap(adcp_byte_swap),
    .db(adcp_db), .data(if_word), .valid(if_valid)
  );

  adc_serial #(.NCH(4)) u_adc_ser (
    .clk, .rst_n, .start_n(!tick_ser),
    .convst_n(adcs_convst_n), .cs_n(adcs_cs_n), .sclk(adcs_sclk),
    .sdata(adcs_sdata), .data(ser_words), .valid(ser_valid)
  );

  sample_t i_f, i_1, i_l, v_c;
  assign i_f = sample_t'(if_word);
  assign i_1 = sample_t'(ser_words[0]);
  assign i_l = sample_t'(ser_words[1]);
  assign v_c = sample_t'(ser_words[2]);

  // ------------------------------------------------------------ DSP link
  logic [1:0]  ds_pair;
  logic        word_sel, snap;
  logic [15:0] tx_data, rx_data;
  logic [2:0]  rx_sel;
  logic        rx_valid, xfer_done;
  logic [1:0]  xfer_pair;
  dsp_regs_t   regs;

  spi_dsp_control u_spi (
    .clk, .rst_n, .start_n(!tick_dsp), .ds_pair_in(ds_pair),
    .tx_data, .word_sel, .data_select,
    .spi_ste_n, .spi_clk, .spi_simo, .spi_somi,
    .rx_data, .rx_sel, .rx_valid, .done(xfer_done), .done_pair(xfer_pair),
    .snap
  );

  spi_dsp_sender u_sender (
    .clk, .rst_n, .snap, .word_sel, .acq_il(i_l), .acq_vc(v_c), .tx_data
  );

  spi_dsp_receptor u_receptor (
    .clk, .rst_n, .rx_valid, .rx_sel, .rx_data, .regs
  );

  // ------------------------------------------------------ pulse sequencer
  logic s4_enable, bridge_enable;

  pulse_control #(.TICK_CYCLES(TICK_CYCLES)) u_pulse (
    .clk, .rst_n,
    .forewarning(forewarning_s), .start(start_s), .end_dsp_calc(end_calc_s),
    .xfer_done, .xfer_pair,
    .i_load(i_l), .i_reference(regs.i_reference), .time_pulse(regs.time_pulse),
    .begin_dsp_calc, .ds_pair,
    .s1_control, .s2_control, .s3_control,
    .s4_enable, .bridge_enable, .active_regulation, .state
  );

  // ------------------------------------------------- current controllers
  sample_t reference_if;

  if_reference u_ifref (
    .clk, .rst_n,
    .dsp_control(regs.regulation_result), .damping_coeff(regs.damping_coeff),
    .vc(v_c), .i_ref(regs.i_reference), .i1(i_1), .reference_if
  );

  logic i1_neg_unused, i1_comm, if_comm;

  hysteresis_control #(.MIN_PERIOD(I1_MIN_PERIOD)) u_hys_i1 (
    .clk, .rst_n, .enable(s4_enable),
    .ref_i(regs.i_reference), .meas(i_1),
    .band_hi(regs.hys_i1_max), .band_lo(regs.hys_i1_min),
    .pos(s4_gate), .neg(i1_neg_unused), .limited(i1_limited), .commutation(i1_comm)
  );

  hysteresis_control #(.MIN_PERIOD(IF_MIN_PERIOD)) u_hys_if (
    .clk, .rst_n, .enable(bridge_enable),
    .ref_i(reference_if), .meas(i_f),
    .band_hi(regs.hys_if_max), .band_lo(regs.hys_if_min),
    .pos(bridge_pos), .neg(bridge_neg), .limited(if_limited), .commutation(if_comm)
  );

  // ------------------------------------------------------------ test DACs
  // Signed samples shown as straight binary (offset) on 14 bits.
  logic [1:0][13:0] dac_words;
  logic             dac_busy;
  assign dac_words[0] = {~reference_if[15], reference_if[14:2]};
  assign dac_words[1] = {~i_l[15], i_l[14:2]};

  dac_serial #(.NCH(2)) u_dac (
    .clk, .rst_n, .start(tick_ser), .data(dac_words),
    .dac_clk, .sync_n(dac_sync_n), .dout(dac_dout), .busy(dac_busy)
  );

endmodule
