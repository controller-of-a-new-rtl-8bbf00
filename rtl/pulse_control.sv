// Pulse sequencer of the MEGADISCAP converter (FPGA "Pulse Control" block).
//
// It walks the converter through the five states of one current pulse:
//   I   standby       all switches off, waiting for FOREWARNING;
//   II  preparation   BEGIN_DSP_CALC is raised until the DSP answers with
//                     END_DSP_CALC; once END_DSP_CALC drops again the
//                     parameter pairs 01, 10 and 11 are read over the DSP
//                     link, one complete exchange each, then DATA_SELECT
//                     returns to 00 and START is awaited;
//   III rise          S1 and S2 on; the pulse timer, loaded with Time_Pulse,
//                     starts; leaves when the measured load current reaches
//                     I_Reference;
//   IV  flat-top      S1 off, S2 and S3 on, S4_ENABLE, BRIDGE_ENABLE and
//                     ACTIVE_REGULATION high;
//   V   fall          every switch off until the load current has decayed
//                     below I_ZERO_CODE, then back to standby.
// The pulse timer runs in steps of TICK_CYCLES clocks (1 us at 40 MHz) and
// ends rise or flat-top, whichever is in progress, when it expires.
//
// Interface: forewarning, start and end_dsp_calc must already be synchronous
// (level, active high).  xfer_done pulses at the end of each DSP exchange and
// xfer_pair tells which DATA_SELECT pair that exchange used.  All outputs are
// registered, so no switch command can glitch.
//
// The states, the switch pattern of each state and the DATA_SELECT order
// follow the document; the microsecond unit of Time_Pulse, the compare of the
// load-current sample against I_Reference to end the rise, and the decay
// threshold that ends the fall are this design's choices.
module pulse_control
  import megadiscap_pkg::*;
#(
  parameter int unsigned    TICK_CYCLES = CLK_MHZ,
  parameter logic signed [15:0] I_ZERO_CODE = -16'sd32000
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          forewarning,
  input  logic          start,
  input  logic          end_dsp_calc,
  input  logic          xfer_done,
  input  logic [1:0]    xfer_pair,
  input  sample_t       i_load,
  input  sample_t       i_reference,
  input  logic [15:0]   time_pulse,
  output logic          begin_dsp_calc,
  output logic [1:0]    ds_pair,
  output logic          s1_control,
  output logic          s2_control,
  output logic          s3_control,
  output logic          s4_enable,
  output logic          bridge_enable,
  output logic          active_regulation,
  output pulse_state_t  state
);

  pulse_state_t state_d;
  logic [1:0]   ds_pair_d;
  logic [15:0]  timer;
  logic [$clog2(TICK_CYCLES)-1:0] prescale;
  logic         timer_expired;

  assign timer_expired = (timer == '0);

  always_comb begin
    state_d   = state;
    ds_pair_d = ds_pair;
    unique case (state)
      PS_STANDBY:    if (forewarning) state_d = PS_CALC;
      PS_CALC:       if (end_dsp_calc) state_d = PS_CALC_ACK;
      PS_CALC_ACK:   if (!end_dsp_calc) begin
                       state_d   = PS_LOAD;
                       ds_pair_d = 2'b01;
                     end
      PS_LOAD:       if (xfer_done && xfer_pair == ds_pair) begin
                       if (ds_pair == 2'b11) begin
                         ds_pair_d = 2'b00;
                         state_d   = PS_WAIT_START;
                       end else begin
                         ds_pair_d = ds_pair + 2'b01;
                       end
                     end
      PS_WAIT_START: if (start) state_d = PS_RISE;
      PS_RISE:       if (timer_expired) state_d = PS_FALL;
                     else if (i_load >= i_reference) state_d = PS_FLAT;
      PS_FLAT:       if (timer_expired) state_d = PS_FALL;
      PS_FALL:       if (i_load <= I_ZERO_CODE) state_d = PS_STANDBY;
      default:       state_d = PS_STANDBY;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= PS_STANDBY;
      ds_pair           <= 2'b00;
      begin_dsp_calc    <= 1'b0;
      s1_control        <= 1'b0;
      s2_control        <= 1'b0;
      s3_control        <= 1'b0;
      s4_enable         <= 1'b0;
      bridge_enable     <= 1'b0;
      active_regulation <= 1'b0;
      timer             <= '0;
      prescale          <= '0;
    end else begin
      state             <= state_d;
      ds_pair           <= ds_pair_d;
      begin_dsp_calc    <= (state_d == PS_CALC);
      s1_control        <= (state_d == PS_RISE);
      s2_control        <= (state_d == PS_RISE) || (state_d == PS_FLAT);
      s3_control        <= (state_d == PS_FLAT);
      s4_enable         <= (state_d == PS_FLAT);
      bridge_enable     <= (state_d == PS_FLAT);
      active_regulation <= (state_d == PS_FLAT);
      // Pulse timer: loaded at START, counts down during rise and flat-top.
      if (state == PS_WAIT_START) begin
        timer    <= time_pulse;
        prescale <= '0;
      end else if ((state == PS_RISE || state == PS_FLAT) && !timer_expired) begin
        if (prescale == $bits(prescale)'(TICK_CYCLES - 1)) begin
          prescale <= '0;
          timer    <= timer - 16'd1;
        end else begin
          prescale <= prescale + 1'b1;
        end
      end
    end
  end

  // S1 (high-voltage ramp) and S3 (filter connection) are never closed together.
  always_ff @(posedge clk)
    if (rst_n) a_s1_s3_exclusive: assert (!(s1_control && s3_control))
      else $error("S1 and S3 closed together");
  // S1 and S3 only ever conduct while S2 is closed.
  always_ff @(posedge clk)
    if (rst_n) a_s2_common: assert (!(s1_control || s3_control) || s2_control)
      else $error("S1 or S3 closed without S2");

endmodule
