// Serial interface to the AD5641 test DACs (FPGA "DAC Serial" block).
//
// The DACs share one serial CLOCK of half the board clock (20 MHz) that runs
// continuously, and one SYNC line; each has its own DATA_OUT line.  A high
// pulse on `start` (START_TRANSMISSION) is remembered until the next rising
// CLOCK edge; there the 14-bit words are latched, SYNC is pulled low and the
// 16-bit frame, two zero control bits followed by D13..D0, is shifted out MSB
// first, one bit per CLOCK period, changing on rising CLOCK edges so that the
// DAC can take it on the falling ones.  SYNC returns high one CLOCK period
// after D0.  A frame takes 34 to 36 board clocks, so both DACs can be updated
// at 1 Msps from a 40-clock request period.
//
// The frame format, the 20 MHz clock and the 1 Msps rate follow the document;
// the start handshake and the continuous clock are this design's choices.
module dac_serial #(
  parameter int unsigned NCH = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NCH-1:0][13:0] data,
  output logic                 dac_clk,
  output logic                 sync_n,
  output logic [NCH-1:0]       dout,
  output logic                 busy
);

  logic                 pending;
  logic [4:0]           bitcnt;
  logic [NCH-1:0][15:0] shreg;

  always_comb begin
    for (int c = 0; c < NCH; c++) dout[c] = shreg[c][15];
  end
  assign busy = pending || !sync_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_clk <= 1'b0;
      sync_n  <= 1'b1;
      pending <= 1'b0;
      bitcnt  <= '0;
      shreg   <= '0;
    end else begin
      dac_clk <= ~dac_clk;
      if (start) pending <= 1'b1;
      // Everything on the DAC side changes together with a rising CLOCK edge.
      if (!dac_clk) begin
        if (!sync_n) begin
          if (bitcnt == 5'd15) begin
            sync_n <= 1'b1;
            shreg  <= '0;
          end else begin
            bitcnt <= bitcnt + 1'b1;
            for (int c = 0; c < NCH; c++) shreg[c] <= {shreg[c][14:0], 1'b0};
          end
        end else if (pending || start) begin
          pending <= 1'b0;
          sync_n  <= 1'b0;
          bitcnt  <= '0;
          for (int c = 0; c < NCH; c++) shreg[c] <= {2'b00, data[c]};
        end
      end
    end
  end

endmodule
