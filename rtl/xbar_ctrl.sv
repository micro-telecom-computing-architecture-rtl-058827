// Crossbar switching-pattern generator.
//
// The RF front end routes its four RF inputs through its four RF channels in
// a rotating order so that every input sees the same average gain. This
// module steps the pattern every PERIOD clocks (8160 ADC clocks, i.e.
// 108.8 MHz / 8160 = 13.3 kHz, as in the design), cycling 0,1,2,3,0,...
// Pattern p routes RF input k to RF channel (k + p) mod 4.
//
// sw_pattern drives the analog switch in the front end. dig_pattern is the
// same pattern delayed by SYNC_DELAY clocks, the latency from the switch to
// the digital crossbar input (ADC pipeline and cabling), so that the digital
// crossbar undoes exactly the permutation the samples went through. The
// delay value and the 2-bit pattern encoding are this design's choice; the
// front end's switch control lines are decoded from sw_pattern outside the
// FPGA logic.
//
// When enable is low (switching is disabled while raw ADC or turn-by-turn
// data are acquired, because switching glitches spoil turn-by-turn
// resolution) the pattern returns to 0 (straight through) and the period
// counter restarts. sw_step pulses for one clock when sw_pattern changes.
module xbar_ctrl #(
  parameter int unsigned PERIOD     = 8160,
  parameter int unsigned SYNC_DELAY = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  output logic [1:0] sw_pattern,
  output logic [1:0] dig_pattern,
  output logic       sw_step
);
  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;
  logic [1:0]    pat_dly [SYNC_DELAY+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      sw_pattern <= 2'd0;
      sw_step    <= 1'b0;
    end else if (!enable) begin
      cnt        <= '0;
      sw_step    <= (sw_pattern != 2'd0);
      sw_pattern <= 2'd0;
    end else if (cnt == CW'(PERIOD - 1)) begin
      cnt        <= '0;
      sw_pattern <= sw_pattern + 2'd1;
      sw_step    <= 1'b1;
    end else begin
      cnt     <= cnt + 1'b1;
      sw_step <= 1'b0;
    end
  end

  // Delay line that aligns the digital crossbar with the sampled data.
  assign pat_dly[0] = sw_pattern;
  for (genvar i = 0; i < SYNC_DELAY; i++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pat_dly[i+1] <= 2'd0;
      else        pat_dly[i+1] <= pat_dly[i];
    end
  end
  assign dig_pattern = pat_dly[SYNC_DELAY];

endmodule
