// Parameter registers written by the DSP (FPGA "SPI DSP Receptor" block).
//
// Every word the SPI master receives arrives with the 3-bit DATA_SELECT under
// which it was exchanged; the word is stored in the register Table 4 of the
// protocol assigns to that code: 000 regulation result, 001 damping
// coefficient, 010 current reference, 011 pulse time, 100/101 IF band
// max/min, 110/111 I1 band max/min.  Writes take effect one clock after
// rx_valid.  All registers reset to zero.
//
// The mapping follows the document; the reset values are this design's choice.
module spi_dsp_receptor
  import megadiscap_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  logic [2:0]  rx_sel,
  input  logic [15:0] rx_data,
  output dsp_regs_t   regs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else if (rx_valid) begin
      unique case (data_select_t'(rx_sel))
        DS_REGULATION_RESULT: regs.regulation_result <= rx_data;
        DS_DAMPING_COEFF:     regs.damping_coeff     <= rx_data;
        DS_I_REFERENCE:       regs.i_reference       <= rx_data;
        DS_TIME_PULSE:        regs.time_pulse        <= rx_data;
        DS_HYS_IF_MAX:        regs.hys_if_max        <= rx_data;
        DS_HYS_IF_MIN:        regs.hys_if_min        <= rx_data;
        DS_HYS_I1_MAX:        regs.hys_i1_max        <= rx_data;
        DS_HYS_I1_MIN:        regs.hys_i1_min        <= rx_data;
        default: ;
      endcase
    end
  end

endmodule
