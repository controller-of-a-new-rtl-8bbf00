// Serial-mode AD7621 interface (FPGA "ADC Serial" block) for the four 1 Msps
// channels, which convert and are read simultaneously.
//
// The sequence is that of the parallel block: a low level on start_n
// (START_ACQUISITION) pulls CONVERT_START low for CONVST_CYCLES clocks, the
// converters get CONV_CYCLES clocks (450 ns) to convert, then CHIP_SELECT goes
// low and SERIAL_CLOCK runs for 16 periods at the board clock rate (40 MHz).
// The converters update SERIAL_DATA, MSB first, on each rising edge of
// SERIAL_CLOCK; the FPGA reads each bit at the following rising edge rather
// than the falling one, leaving a whole period for board delays.  After the
// 16th bit CHIP_SELECT returns high and the four words are latched on `data`,
// with `valid` high for one cycle, CONV_CYCLES + 17 clocks (35) after the
// request, inside the 40-clock sample period.
//
// SERIAL_CLOCK is the board clock gated by an enable captured on the falling
// clock edge (a latch-free glitchless gate), so its rising edges coincide with
// the FPGA's own.  The bit order, read edge and clock rate follow the document;
// the gating circuit and the length of the CONVERT_START pulse are this
// design's choices.
module adc_serial #(
  parameter int unsigned NCH           = 4,
  parameter int unsigned CONV_CYCLES   = 18,
  parameter int unsigned CONVST_CYCLES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_n,
  output logic                  convst_n,
  output logic                  cs_n,
  output logic                  sclk,
  input  logic [NCH-1:0]        sdata,
  output logic [NCH-1:0][15:0]  data,
  output logic                  valid
);

  typedef enum logic [1:0] {IDLE, CONV, CS_SETUP, SHIFT} adc_state_t;
  adc_state_t state;
  logic [$clog2(CONV_CYCLES)-1:0] cnt;
  logic [3:0] bitcnt;
  logic       sclk_en;
  logic       sclk_gate;
  logic [NCH-1:0][15:0] shreg;

  // Glitch-free clock gate: enable changes only while clk is low.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) sclk_gate <= 1'b0;
    else        sclk_gate <= sclk_en;
  end
  assign sclk = clk & sclk_gate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cnt      <= '0;
      bitcnt   <= '0;
      sclk_en  <= 1'b0;
      convst_n <= 1'b1;
      cs_n     <= 1'b1;
      shreg    <= '0;
      data     <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      // A rising SERIAL_CLOCK edge happens at this clock edge exactly when the
      // gate was enabled during the cycle that ends here.
      if (sclk_en) begin
        for (int c = 0; c < NCH; c++) shreg[c] <= {shreg[c][14:0], sdata[c]};
      end
      unique case (state)
        IDLE: begin
          if (!start_n) begin
            state    <= CONV;
            cnt      <= '0;
            convst_n <= 1'b0;
          end
        end
        CONV: begin
          if (cnt == $bits(cnt)'(CONVST_CYCLES - 1)) convst_n <= 1'b1;
          if (cnt == $bits(cnt)'(CONV_CYCLES - 1)) begin
            state <= CS_SETUP;
            cs_n  <= 1'b0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        CS_SETUP: begin
          state   <= SHIFT;
          sclk_en <= 1'b1;
          bitcnt  <= '0;
        end
        SHIFT: begin
          if (bitcnt == 4'd15) begin
            sclk_en <= 1'b0;
            state   <= IDLE;
            cs_n    <= 1'b1;
            for (int c = 0; c < NCH; c++) data[c] <= {shreg[c][14:0], sdata[c]};
            valid   <= 1'b1;
          end else begin
            bitcnt <= bitcnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
