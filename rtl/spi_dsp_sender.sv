// Words sent to the DSP (FPGA "SPI DSP Sender" block).
//
// Whatever the DATA_SELECT pair, the FPGA answers each exchange with the same
// two measurements: first Acquisition_IL (load current), then Acquisition_Vc (Table 4 of the
// protocol).  Both samples are frozen together when the exchange starts
// (`snap`), so the DSP controller always sees the load current and the capacitor voltage taken at
// the same instant even if a new acquisition completes during the exchange;
// `word_sel` (DATA_SELECT(0)) then picks the word to shift out.
//
// The word assignment follows the document; freezing both samples at the
// start of the exchange is this design's choice.
module spi_dsp_sender
  import megadiscap_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        snap,
  input  logic        word_sel,
  input  sample_t     acq_il,
  input  sample_t     acq_vc,
  output logic [15:0] tx_data
);

  sample_t il_q, vc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      il_q <= '0;
      vc_q <= '0;
    end else if (snap) begin
      il_q <= acq_il;
      vc_q <= acq_vc;
    end
  end

  assign tx_data = word_sel ? vc_q : il_q;

endmodule
