// SPI master of the DSP link (FPGA "SPI DSP Control" block).
//
// A low level on start_n (START_TRANSF) starts one exchange: SPI_STE goes low,
// the DATA_SELECT pair requested by the pulse sequencer is frozen, and two
// 16-bit words are sent and two received at the same time, MSB first, on a
// 20 MHz SPI_CLOCK (two board clocks per bit).  The word to send is taken from
// `tx_data` one cycle after `word_sel` (DATA_SELECT(0)) has settled; SIMO
// changes when SPI_CLOCK falls and SOMI is read at the same falling edge, the
// DSP doing the reverse on the rising edge.  After each received word,
// `rx_valid` pulses with the word and its full 3-bit DATA_SELECT, then
// DATA_SELECT(0) toggles for the second word.  After the second word SPI_STE
// returns high and `done` pulses with the pair used.  An exchange takes 70
// board clocks, so one every 200 clocks (200 kHz) leaves the line idle for
// the rest.
//
// Word count, word width, clock rate and the DATA_SELECT(0) toggle between
// words follow the document; the clock phase and idle level are this
// design's choices.
module spi_dsp_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_n,
  input  logic [1:0]  ds_pair_in,
  input  logic [15:0] tx_data,
  output logic        word_sel,
  output logic [2:0]  data_select,
  output logic        spi_ste_n,
  output logic        spi_clk,
  output logic        spi_simo,
  input  logic        spi_somi,
  output logic [15:0] rx_data,
  output logic [2:0]  rx_sel,
  output logic        rx_valid,
  output logic        done,
  output logic [1:0]  done_pair,
  output logic        snap
);

  typedef enum logic [2:0] {IDLE, LOAD, BIT_LO, BIT_HI, WORD_END, FINISH} spi_state_t;
  spi_state_t  state;
  logic [1:0]  pair;
  logic [3:0]  bitcnt;
  logic [15:0] tx_sh;
  logic [15:0] rx_sh;

  assign data_select = {pair, word_sel};
  assign spi_simo    = tx_sh[15];
  // Tells the sender to freeze the acquisitions for this exchange.
  assign snap        = (state == IDLE) && !start_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      pair      <= 2'b00;
      word_sel  <= 1'b0;
      bitcnt    <= '0;
      tx_sh     <= '0;
      rx_sh     <= '0;
      spi_ste_n <= 1'b1;
      spi_clk   <= 1'b0;
      rx_data   <= '0;
      rx_sel    <= '0;
      rx_valid  <= 1'b0;
      done      <= 1'b0;
      done_pair <= 2'b00;
    end else begin
      rx_valid <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        IDLE: if (!start_n) begin
          spi_ste_n <= 1'b0;
          pair      <= ds_pair_in;
          word_sel  <= 1'b0;
          state     <= LOAD;
        end
        LOAD: begin
          tx_sh  <= tx_data;
          bitcnt <= '0;
          state  <= BIT_LO;
        end
        BIT_LO: begin
          spi_clk <= 1'b1;
          state   <= BIT_HI;
        end
        BIT_HI: begin
          spi_clk <= 1'b0;
          rx_sh   <= {rx_sh[14:0], spi_somi};
          tx_sh   <= {tx_sh[14:0], 1'b0};
          if (bitcnt == 4'd15) state <= WORD_END;
          else begin
            bitcnt <= bitcnt + 1'b1;
            state  <= BIT_LO;
          end
        end
        WORD_END: begin
          rx_data  <= rx_sh;
          rx_sel   <= {pair, word_sel};
          rx_valid <= 1'b1;
          if (!word_sel) begin
            word_sel <= 1'b1;
            state    <= LOAD;
          end else begin
            state <= FINISH;
          end
        end
        FINISH: begin
          spi_ste_n <= 1'b1;
          word_sel  <= 1'b0;
          done      <= 1'b1;
          done_pair <= pair;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // SPI_CLOCK only toggles inside a frame.
  always_ff @(posedge clk)
    if (rst_n) a_clk_in_frame: assert (!spi_clk || !spi_ste_n)
      else $error("SPI_CLOCK high outside a frame");

endmodule
