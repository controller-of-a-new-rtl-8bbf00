// Behavioural model of the DSP side of the SPI link (the DSP is a bought-in
// processor, not part of the FPGA design).  When SPI_STE falls it takes, 1 ns
// later, the two words to send (tx0, tx1) and records DATA_SELECT; it reads SIMO on each
// rising SPI_CLOCK edge and moves SOMI on each falling edge, 16 bits per
// word, MSB first.  When SPI_STE rises it publishes the two received words,
// the DATA_SELECT seen at the start and the number of clock pulses, and
// counts the frame.
module dsp_spi_slave (
  input  logic        ste_n,
  input  logic        sclk,
  input  logic        simo,
  output logic        somi,
  input  logic [2:0]  data_select,
  input  logic [15:0] tx0,
  input  logic [15:0] tx1,
  output logic [15:0] rx0,
  output logic [15:0] rx1,
  output logic [2:0]  ds_at_start,
  output int          nbits_last,
  output int          nframes
);
  logic [15:0] sh_tx, sh_rx, tx1_q;
  int nbits = 0;

  initial begin
    nframes = 0; somi = 0; rx0 = 0; rx1 = 0; ds_at_start = 0; nbits_last = 0;
    sh_tx = 0; sh_rx = 0; tx1_q = 0;
  end

  always @(negedge ste_n) begin
    #1;  // let DATA_SELECT and the words chosen from it settle
    sh_tx = tx0; tx1_q = tx1; nbits = 0;
    ds_at_start = data_select;
    somi = sh_tx[15];
  end
  always @(posedge sclk) if (!ste_n) sh_rx = {sh_rx[14:0], simo};
  always @(negedge sclk) if (!ste_n) begin
    nbits++;
    if (nbits == 16) begin rx0 = sh_rx; sh_tx = tx1_q; end
    else begin
      if (nbits == 32) rx1 = sh_rx;
      sh_tx = {sh_tx[14:0], 1'b0};
    end
    somi = sh_tx[15];
  end
  always @(posedge ste_n) begin
    nbits_last = nbits;
    nframes++;
  end
endmodule
