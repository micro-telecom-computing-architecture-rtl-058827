// Behavioural model of the analog side for the testbenches: four pickup
// signals at 408 MHz, the analog crossbar switch, four RF channels with
// individual gains and the ADCs, as seen at 108.8 MHz.
//
// Electrode k has amplitude v[k] and phase ph[k]; IQ undersampling makes
// its samples I, Q, -I, -Q, ... with I = v cos(ph), Q = v sin(ph). The
// crossbar under pattern p sends electrode k into RF channel (k + p) mod 4,
// whose gain is gain[channel]. The pattern used for a sample is the one the
// switch was set to LAT clocks earlier: the delay of the front end and the
// ADC pipeline, which the FPGA's digital crossbar compensates. A small
// uniform noise of +/-noise counts is added. elec[k] is the word that
// carries electrode k, whichever ADC it went to: the digital crossbar must
// deliver it as raw-data channel k.
module bpm_signal_model
  import bpm_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic       clk,
  input  logic [1:0] sw_pattern,
  input  real        v     [NCH],
  input  real        ph    [NCH],
  input  real        gain  [NCH],
  input  int         noise,
  output adc_t       adc   [NCH],
  output adc_t       elec  [NCH]
);
  logic [1:0] hist [LAT];
  int unsigned n = 0;

  initial begin
    for (int i = 0; i < LAT; i++) hist[i] = 2'd0;
    for (int k = 0; k < NCH; k++) begin adc[k] = '0; elec[k] = '0; end
  end

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) hist[i] <= hist[i-1];
    hist[0] <= sw_pattern;
  end

  always @(negedge clk) begin
    logic [1:0] p;
    p = hist[LAT-1];
    for (int k = 0; k < NCH; k++) begin
      real s, g;
      int ch, nz;
      case (n % 4)
        0: s =  v[k] * $cos(ph[k]);
        1: s =  v[k] * $sin(ph[k]);
        2: s = -v[k] * $cos(ph[k]);
        default: s = -v[k] * $sin(ph[k]);
      endcase
      ch = (k + int'(p)) % 4;
      g  = gain[ch];
      nz = (noise > 0) ? int'($urandom_range(2 * noise)) - noise : 0;
      adc[ch]  = adc_t'($rtoi(s * g) + nz);
      elec[k]  = adc[ch];
    end
    n++;
  end
endmodule
