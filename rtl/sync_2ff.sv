// Two-flop synchronizer for the asynchronous control lines that reach the FPGA
// (FOREWARNING and START from the control CPU, END_DSP_CALC from the DSP).
// Adds two clock cycles of latency.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
