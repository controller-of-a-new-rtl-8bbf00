// Periodic strobe generator.  Emits a one-cycle high pulse on `tick` every
// PERIOD clock cycles; the first pulse comes PERIOD cycles after reset.  The
// FPGA uses one per sampling rate (2 MHz parallel ADC, 1 MHz serial ADCs and
// DACs, 200 kHz DSP exchange), derived from the 40 MHz board clock.
module tick_gen #(
  parameter int unsigned PERIOD = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  logic [$clog2(PERIOD)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == $bits(cnt)'(PERIOD - 1));
      cnt  <= (cnt == $bits(cnt)'(PERIOD - 1)) ? '0 : cnt + 1'b1;
    end
  end
endmodule
