// Testbench of spi_dsp_sender: after `snap` the first word must be the load
// current and the second the capacitor voltage sampled at that instant, even
// when the live samples change during the exchange.
module tb_spi_dsp_sender;
  import megadiscap_pkg::*;
  logic clk = 0, rst_n = 0, snap = 0, word_sel = 0;
  sample_t acq_il = 0, acq_vc = 0;
  logic [15:0] tx_data;
  int checks = 0, failures = 0;
  spi_dsp_sender dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] il, vc;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      il = 16'($urandom); vc = 16'($urandom);
      @(negedge clk); acq_il = il; acq_vc = vc; snap = 1;
      @(negedge clk); snap = 0; acq_il = 16'($urandom); acq_vc = 16'($urandom);
      word_sel = 0; #1;
      checks++; if (tx_data !== il) begin failures++; $display("FAIL word0 %h %h", tx_data, il); end
      @(negedge clk); word_sel = 1; acq_vc = 16'($urandom); #1;
      checks++; if (tx_data !== vc) begin failures++; $display("FAIL word1 %h %h", tx_data, vc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
