// FPGA signal processing of a four-electrode beam position monitor.
//
// Four ADCs sample the 408 MHz pickup signals at 108.8 MHz (IQ
// undersampling: successive samples are I, Q, -I, -Q). The chain is
//   xbar_ctrl   rotating switch pattern for the RF front end, every 8160
//               clocks (13.3 kHz), and the same pattern delayed to the data
//   dig_xbar    undoes the front end's permutation, so that DSP channel k
//               always holds electrode k (A, B, C, D)
//   tbt_channel x4: I/Q split, CIC /12, 101-tap FIR, quadrant adjustment,
//               7-cell CORDIC -> turn-by-turn amplitudes at 4.533 MHz
//   amp_decim   CIC /90 + 69-tap FIR /5 -> FA amplitudes at 10.07 kHz
//   amp_decim   CIC /100 + 99-tap FIR /10 -> SA amplitudes at 10.07 Hz
//   dos_position x3: difference-over-sum X and Y at each of the three rates
// The reordered ADC words are also brought out (raw data readout). The
// readout of all data streams to the crate's CPU (PCI Express) and the RF
// front end, ADCs and clock synthesizer are outside this module; the
// front-end switch pattern is an output, the ADC words are inputs.
//
// Switching should be off (xbar_enable = 0) while raw ADC or turn-by-turn
// data are recorded, because the switch transients disturb them; with it on,
// FA and SA data see every RF channel equally often, which cancels the
// channels' gain differences in the positions.
//
// Timing: one ADC word per channel per clock, no back-pressure. Latencies
// are fixed: the turn-by-turn amplitude follows its last input sample by
// about 40 clocks, positions add RATIO_FRAC+3 clocks. All strobes are one
// clock wide. Widths and the CORDIC gain (left uncorrected, it cancels in
// the ratio) are this design's choices; the filter orders, decimation
// factors, switching period and CORDIC cell count are those of the design
// being reproduced. FIR coefficients are this design's own low-pass
// designs for those orders.
module bpm_dsp_top
  import bpm_pkg::*;
#(
  parameter int unsigned XBAR_PERIOD  = 8160,
  parameter int unsigned XBAR_SYNC    = 4,
  parameter int unsigned CIC_STAGES   = 5,
  parameter int unsigned TBT_CIC_R    = 12,
  parameter int unsigned TBT_FIR_TAPS = 101,
  parameter int unsigned TBT_FIR_MACS = 5,
  parameter string       TBT_FIR_FILE = "rtl/fir_tbt_101.hex",
  parameter int unsigned CORDIC_CELLS = 7,
  parameter int unsigned FA_CIC_R     = 90,
  parameter int unsigned FA_FIR_TAPS  = 69,
  parameter int unsigned FA_FIR_D     = 5,
  parameter string       FA_FIR_FILE  = "rtl/fir_fa_69.hex",
  parameter int unsigned SA_CIC_R     = 100,
  parameter int unsigned SA_FIR_TAPS  = 99,
  parameter int unsigned SA_FIR_D     = 10,
  parameter string       SA_FIR_FILE  = "rtl/fir_sa_99.hex"
) (
  input  logic           clk,          // ADC clock, 108.8 MHz
  input  logic           rst_n,
  input  adc_t           adc_in [NCH], // ADC words in RF-channel order
  input  logic           xbar_enable,
  input  logic [K_W-1:0] kx,           // position coefficients, nm
  input  logic [K_W-1:0] ky,
  input  pos_t           x_off,        // offsets, nm
  input  pos_t           y_off,
  // to the RF front end
  output logic [1:0]     xbar_sw,
  output logic           xbar_step,
  // raw data, electrode order, one word per clock
  output adc_t           adc_raw [NCH],
  // turn-by-turn
  output logic           tbt_iq_valid,
  output logic signed [IQ_W-1:0] tbt_i [NCH],
  output logic signed [IQ_W-1:0] tbt_q [NCH],
  output amp4_t          tbt_amp,
  output pos_sample_t    tbt_pos,
  // fast acquisition
  output amp4_t          fa_amp,
  output pos_sample_t    fa_pos,
  // slow acquisition
  output amp4_t          sa_amp,
  output pos_sample_t    sa_pos,
  // status
  output logic [NCH-1:0] quad_rotated,
  output logic           fir_overrun,
  output logic [2:0]     div_zero
);
  logic [1:0] dig_pattern;
  logic       raw_v;

  xbar_ctrl #(.PERIOD(XBAR_PERIOD), .SYNC_DELAY(XBAR_SYNC)) u_xbar_ctrl (
    .clk, .rst_n, .enable(xbar_enable),
    .sw_pattern(xbar_sw), .dig_pattern, .sw_step(xbar_step));

  dig_xbar #(.W(ADC_W)) u_dig_xbar (
    .clk, .rst_n, .pattern(dig_pattern), .adc_in, .ch_out(adc_raw));

  // Raw data are valid from the first clock after reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) raw_v <= 1'b0;
    else        raw_v <= 1'b1;
  end

  logic [NCH-1:0] amp_v, tbt_v, ov_tbt;
  amp_t           amp [NCH];

  for (genvar k = 0; k < NCH; k++) begin : g_tbt
    tbt_channel #(.CIC_R(TBT_CIC_R), .CIC_N(CIC_STAGES), .FIR_TAPS(TBT_FIR_TAPS),
                  .FIR_MACS(TBT_FIR_MACS), .FIR_FILE(TBT_FIR_FILE),
                  .CELLS(CORDIC_CELLS)) u_ch (
      .clk, .rst_n, .in_valid(raw_v), .x(adc_raw[k]),
      .tbt_valid(tbt_v[k]), .tbt_i(tbt_i[k]), .tbt_q(tbt_q[k]),
      .amp_valid(amp_v[k]), .amp(amp[k]), .rotated(quad_rotated[k]),
      .overrun(ov_tbt[k]));
  end

  assign tbt_iq_valid  = tbt_v[0];
  assign tbt_amp.valid = amp_v[0];
  assign tbt_amp.a     = amp[0];
  assign tbt_amp.b     = amp[1];
  assign tbt_amp.c     = amp[2];
  assign tbt_amp.d     = amp[3];

  logic ov_fa, ov_sa;

  amp_decim #(.CIC_R(FA_CIC_R), .CIC_N(CIC_STAGES), .FIR_TAPS(FA_FIR_TAPS),
              .FIR_D(FA_FIR_D), .FIR_FILE(FA_FIR_FILE)) u_fa (
    .clk, .rst_n, .amp_in(tbt_amp), .amp_out(fa_amp), .overrun(ov_fa));

  amp_decim #(.CIC_R(SA_CIC_R), .CIC_N(CIC_STAGES), .FIR_TAPS(SA_FIR_TAPS),
              .FIR_D(SA_FIR_D), .FIR_FILE(SA_FIR_FILE)) u_sa (
    .clk, .rst_n, .amp_in(fa_amp), .amp_out(sa_amp), .overrun(ov_sa));

  assign fir_overrun = (|ov_tbt) | ov_fa | ov_sa;

  dos_position u_pos_tbt (.clk, .rst_n, .amp(tbt_amp), .kx, .ky, .x_off, .y_off,
                          .pos(tbt_pos), .div_zero(div_zero[0]));
  dos_position u_pos_fa  (.clk, .rst_n, .amp(fa_amp), .kx, .ky, .x_off, .y_off,
                          .pos(fa_pos), .div_zero(div_zero[1]));
  dos_position u_pos_sa  (.clk, .rst_n, .amp(sa_amp), .kx, .ky, .x_off, .y_off,
                          .pos(sa_pos), .div_zero(div_zero[2]));

  a_amp_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (&amp_v) == (|amp_v));

endmodule
