// Testbench of spi_dsp_receptor: writes each of the eight DATA_SELECT codes
// with random words in random order and checks every register of the struct
// against a shadow copy kept by the testbench (Table 4 mapping).
module tb_spi_dsp_receptor;
  import megadiscap_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid = 0;
  logic [2:0] rx_sel = 0;
  logic [15:0] rx_data = 0;
  dsp_regs_t regs;
  logic [15:0] shadow [8];
  int checks = 0, failures = 0;
  spi_dsp_receptor dut (.*);
  always #5 clk = ~clk;

  task automatic compare();
    logic [15:0] got [8];
    got[0] = regs.regulation_result; got[1] = regs.damping_coeff;
    got[2] = regs.i_reference;       got[3] = regs.time_pulse;
    got[4] = regs.hys_if_max;        got[5] = regs.hys_if_min;
    got[6] = regs.hys_i1_max;        got[7] = regs.hys_i1_min;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (got[i] !== shadow[i]) begin
        failures++; $display("FAIL reg %0d got %h exp %h", i, got[i], shadow[i]);
      end
    end
  endtask

  initial begin
    #1000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) shadow[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    compare();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      rx_sel = 3'($urandom); rx_data = 16'($urandom); rx_valid = ($urandom % 4) != 0;
      if (rx_valid) shadow[rx_sel] = rx_data;
      @(negedge clk); rx_valid = 0; rx_data = 16'($urandom);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
