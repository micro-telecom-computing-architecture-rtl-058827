// Testbench for dig_xbar: random words and patterns; output k must equal
// input (k + pattern) mod 4 of the previous clock.
module tb_dig_xbar;
  import bpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] pat;
  adc_t din [NCH];
  adc_t dout [NCH];
  dig_xbar dut (.clk, .rst_n, .pattern(pat), .adc_in(din), .ch_out(dout));

  initial begin
    pat = 0;
    for (int k = 0; k < NCH; k++) din[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      adc_t exp_v [NCH];
      @(negedge clk);
      pat = 2'($urandom);
      for (int k = 0; k < NCH; k++) din[k] = adc_t'($urandom);
      for (int k = 0; k < NCH; k++) exp_v[k] = din[(k + int'(pat)) % 4];
      @(posedge clk); #1;
      for (int k = 0; k < NCH; k++) begin
        checks++;
        if (dout[k] !== exp_v[k]) begin
          failures++;
          $display("FAIL n=%0d k=%0d pat=%0d got %0d exp %0d", n, k, pat, dout[k], exp_v[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
