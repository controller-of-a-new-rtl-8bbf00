// Shared types and constants of the MEGADISCAP pulsed-source controller FPGA.
//
// All converter samples are 16-bit two's complement words exactly as the AD7621
// delivers them (0x7FFF full scale positive, 0x8000 full scale negative); the
// FPGA never rescales them, so references and hysteresis bands sent by the DSP
// use the same codes.  The DSP link carries eight 16-bit parameters, addressed
// by a 3-bit DATA_SELECT whose two upper bits are chosen by the pulse sequencer
// and whose lowest bit is the word index inside one SPI exchange.
package megadiscap_pkg;

  // FPGA clock of the control board, in MHz.
  localparam int unsigned CLK_MHZ = 40;

  typedef logic signed [15:0] sample_t;

  // DATA_SELECT codes of the words received from the DSP.
  typedef enum logic [2:0] {
    DS_REGULATION_RESULT = 3'b000,
    DS_DAMPING_COEFF     = 3'b001,
    DS_I_REFERENCE       = 3'b010,
    DS_TIME_PULSE        = 3'b011,
    DS_HYS_IF_MAX        = 3'b100,
    DS_HYS_IF_MIN        = 3'b101,
    DS_HYS_I1_MAX        = 3'b110,
    DS_HYS_I1_MIN        = 3'b111
  } data_select_t;

  // Parameters held in the FPGA, as written by the DSP.
  typedef struct packed {
    sample_t     regulation_result;  // output of the DSP current controller Gc
    sample_t     damping_coeff;      // K of the damping loop, signed Q0.15
    sample_t     i_reference;        // flat-top current reference (ADC code)
    logic [15:0] time_pulse;         // START to fall, in microseconds
    sample_t     hys_if_max;         // IF band, upper offset from the reference
    sample_t     hys_if_min;         // IF band, lower offset from the reference
    sample_t     hys_i1_max;         // I1 band, upper offset from the reference
    sample_t     hys_i1_min;         // I1 band, lower offset from the reference
  } dsp_regs_t;

  // States of the pulse sequencer.
  typedef enum logic [2:0] {
    PS_STANDBY,     // I   : switches off, waiting for FOREWARNING
    PS_CALC,        // II  : BEGIN_DSP_CALC raised, waiting for END_DSP_CALC
    PS_CALC_ACK,    // II  : BEGIN_DSP_CALC dropped, waiting for END_DSP_CALC low
    PS_LOAD,        // II  : reading parameter pairs 01, 10, 11 from the DSP
    PS_WAIT_START,  // II  : parameters loaded, waiting for START
    PS_RISE,        // III : S1 and S2 on, current ramping
    PS_FLAT,        // IV  : S2, S3 on, both hysteresis controls and Gc active
    PS_FALL         // V   : all switches off, energy returned to C1
  } pulse_state_t;

endpackage
