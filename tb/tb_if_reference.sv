// Testbench of if_reference: random and corner operands, expected value
// computed with integer arithmetic and explicit saturation in the testbench;
// one clock of latency is checked.
module tb_if_reference;
  import megadiscap_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t dsp_control = 0, damping_coeff = 0, vc = 0, i_ref = 0, i1 = 0, reference_if;
  int checks = 0, failures = 0;
  if_reference dut (.*);
  always #5 clk = ~clk;

  function automatic int expect_ref(int c, int k, int v, int r, int m);
    longint p = longint'(v) * longint'(k);
    int d = int'(p >>> 15);
    int s = c - d + (r - m);
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  task automatic apply(int c, int k, int v, int r, int m);
    @(negedge clk);
    dsp_control = 16'(c); damping_coeff = 16'(k); vc = 16'(v); i_ref = 16'(r); i1 = 16'(m);
    @(negedge clk);
    checks++;
    if (int'(reference_if) != expect_ref(c, k, v, r, m)) begin
      failures++;
      $display("FAIL c=%0d k=%0d v=%0d r=%0d m=%0d got %0d exp %0d", c, k, v, r, m,
               reference_if, expect_ref(c, k, v, r, m));
    end
  endtask

  initial begin
    #1000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    apply(100, 16384, 200, 500, 400);        // 100 - 100 + 100
    apply(0, -32768, 1000, 0, 0);            // + 1000
    apply(32000, -32768, 32767, 32767, -32768); // positive saturation
    apply(-32000, 32767, 32767, -32768, 32767); // negative saturation
    for (int i = 0; i < 500; i++)
      apply($signed(16'($urandom)), $signed(16'($urandom)), $signed(16'($urandom)),
            $signed(16'($urandom)), $signed(16'($urandom)));
    // latency: the output must not change in the cycle the inputs change
    @(negedge clk); dsp_control = 16'sd1234; damping_coeff = 0; vc = 0; i_ref = 0; i1 = 0;
    @(negedge clk); dsp_control = 16'sd4321;
    #1; checks++; if (reference_if != 16'sd1234) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
