// Digital crossbar switch.
//
// Puts the four ADC streams back into electrode order after the analog
// crossbar in the RF front end has permuted them. Under pattern p, RF input
// k was carried by RF channel / ADC (k + p) mod 4, so output k takes ADC
// (k + p) mod 4. The result is registered: one clock of latency, one sample
// per clock in and out. pattern must already be aligned with the samples
// (see xbar_ctrl's SYNC_DELAY).
module dig_xbar
  import bpm_pkg::*;
#(
  parameter int unsigned W = ADC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          pattern,
  input  logic signed [W-1:0] adc_in  [NCH],
  output logic signed [W-1:0] ch_out  [NCH]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCH; k++) ch_out[k] <= '0;
    end else begin
      for (int k = 0; k < NCH; k++) ch_out[k] <= adc_in[2'(k + int'(pattern))];
    end
  end
endmodule
