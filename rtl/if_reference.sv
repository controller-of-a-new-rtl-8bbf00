// Reference of the active filter current IF (FPGA "Reference Generator").
//
//   REFERENCE_IF = DSP_CONTROL - Vc * DAMPING_COEF + (I_REF - I1)
//
// The first term is the output of the DSP load-current controller (external
// loop), the second damps the LC resonance of the filter capacitor with the
// load (damping loop), the third feeds the known ripple of the I1 generator
// forward so the filter cancels it (internal loop).  The damping coefficient
// is a signed fraction with DAMP_FRAC fractional bits (Q0.15: -1 to just
// under +1), the product is truncated toward minus infinity, the sum is
// formed at full width and saturated to 16 bits.  The result is registered:
// one clock of latency, recomputed every clock from the latest samples.
//
// The equation follows the document; the number formats, the saturation and
// the single register stage are this design's choices.
module if_reference
  import megadiscap_pkg::*;
#(
  parameter int unsigned DAMP_FRAC = 15
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t dsp_control,
  input  sample_t damping_coeff,
  input  sample_t vc,
  input  sample_t i_ref,
  input  sample_t i1,
  output sample_t reference_if
);

  logic signed [31:0] damp_prod;
  logic signed [19:0] damp_term;
  logic signed [19:0] sum;

  assign damp_prod = vc * damping_coeff;
  assign damp_term = 20'(damp_prod >>> DAMP_FRAC);
  assign sum = 20'(dsp_control) - damp_term + (20'(i_ref) - 20'(i1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   reference_if <= '0;
    else if (sum > 20'sd32767)    reference_if <= 16'sh7FFF;
    else if (sum < -20'sd32768)   reference_if <= 16'sh8000;
    else                          reference_if <= sum[15:0];
  end

endmodule
