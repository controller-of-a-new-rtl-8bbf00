// Parallel-mode AD7621 interface (FPGA "ADC Parallel" block), 2 Msps channel.
//
// A low level on start_n (START_ACQUISITION) starts one acquisition:
// CONVERT_START is pulled low for CONVST_CYCLES clocks and the converter is
// given CONV_CYCLES clocks (450 ns at 40 MHz) to finish.  The 16-bit result is
// then read over the 8-bit bus in two reads with CHIP_SELECT low: the upper
// byte with BYTE_SWAP low, then the lower byte with BYTE_SWAP high.  CHIP_SELECT
// returns high, the word is latched on `data` and `valid` pulses for a cycle.
// From the clock edge that sees start_n low to the edge that raises `valid`
// takes CONV_CYCLES + 2 clocks.  A new request is accepted at that same edge,
// so back-to-back acquisitions repeat every CONV_CYCLES + 2 clocks: 20 clocks,
// i.e. 2 Msps at 40 MHz.
//
// The sequence and the 450 ns conversion wait follow the document; the byte
// order (upper byte first, as the text states), the bus width and the length
// of the CONVERT_START pulse are this design's choices.
module adc_parallel #(
  parameter int unsigned CONV_CYCLES   = 18,
  parameter int unsigned CONVST_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_n,
  output logic        convst_n,
  output logic        cs_n,
  output logic        byte_swap,
  input  logic [7:0]  db,
  output logic [15:0] data,
  output logic        valid
);

  typedef enum logic [1:0] {IDLE, CONV, RD_HI, RD_LO} adc_state_t;
  adc_state_t state;
  logic [$clog2(CONV_CYCLES)-1:0] cnt;
  logic [7:0] upper;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      upper     <= '0;
      convst_n  <= 1'b1;
      cs_n      <= 1'b1;
      byte_swap <= 1'b0;
      data      <= '0;
      valid     <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        IDLE, RD_LO: begin
          if (state == RD_LO) begin
            data      <= {upper, db};
            valid     <= 1'b1;
            cs_n      <= 1'b1;
            byte_swap <= 1'b0;
          end
          if (!start_n) begin
            state    <= CONV;
            cnt      <= '0;
            convst_n <= 1'b0;
          end else begin
            state <= IDLE;
          end
        end
        CONV: begin
          if (cnt == $bits(cnt)'(CONVST_CYCLES - 1)) convst_n <= 1'b1;
          if (cnt == $bits(cnt)'(CONV_CYCLES - 1)) begin
            state     <= RD_HI;
            cs_n      <= 1'b0;
            byte_swap <= 1'b0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RD_HI: begin
          upper     <= db;
          byte_swap <= 1'b1;
          state     <= RD_LO;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
