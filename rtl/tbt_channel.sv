// One electrode channel from ADC samples to turn-by-turn amplitude.
//
// ADC words (one per clock, 108.8 MHz) -> iq_demux (I and Q at 54.4 MHz)
// -> one CIC decimator per stream (five stages, R = CIC_R, 12 by default)
// -> one FIR per stream (FIR_TAPS taps, no further decimation) -> quadrant
// adjustment -> CORDIC magnitude. At the design's sizes the output rate is
// 108.8 MHz / 24 = 4.533 MHz, the revolution frequency of the ring, so one
// amplitude comes out per turn. Widths: 16-bit ADC, 17-bit I/Q, 24-bit
// after CIC and FIR, 27-bit amplitude (includes the CORDIC gain 1.647).
// The I and Q FIRs each use FIR_MACS multipliers, enough to finish 101 taps
// within the 24 clocks between turn-by-turn samples.
module tbt_channel
  import bpm_pkg::*;
#(
  parameter int unsigned CIC_R     = 12,
  parameter int unsigned CIC_N     = 5,
  parameter int unsigned FIR_TAPS  = 101,
  parameter int unsigned FIR_MACS  = 5,
  parameter string       FIR_FILE  = "rtl/fir_tbt_101.hex",
  parameter int unsigned CELLS     = 7
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  adc_t                      x,
  output logic                      tbt_valid,
  output logic signed [IQ_W-1:0]    tbt_i,
  output logic signed [IQ_W-1:0]    tbt_q,
  output logic                      amp_valid,
  output amp_t                      amp,
  output logic                      rotated,
  output logic                      overrun
);
  logic                      iq_v;
  logic signed [ADC_W:0]     i_raw, q_raw;
  logic                      ci_v, cq_v;
  logic signed [IQ_W-1:0]    ci, cq;
  logic                      fi_v, fq_v, ovi, ovq;
  logic                      qa_v;
  logic signed [IQ_W:0]      qa_i, qa_q;

  iq_demux #(.IN_W(ADC_W)) u_iq (
    .clk, .rst_n, .in_valid, .x, .iq_valid(iq_v), .i_out(i_raw), .q_out(q_raw));

  cic_decim #(.IN_W(ADC_W+1), .OUT_W(IQ_W), .R(CIC_R), .N(CIC_N)) u_cic_i (
    .clk, .rst_n, .in_valid(iq_v), .x(i_raw), .out_valid(ci_v), .y(ci));
  cic_decim #(.IN_W(ADC_W+1), .OUT_W(IQ_W), .R(CIC_R), .N(CIC_N)) u_cic_q (
    .clk, .rst_n, .in_valid(iq_v), .x(q_raw), .out_valid(cq_v), .y(cq));

  fir_decim #(.IN_W(IQ_W), .OUT_W(IQ_W), .TAPS(FIR_TAPS), .D(1), .MACS(FIR_MACS),
              .COEF_FILE(FIR_FILE)) u_fir_i (
    .clk, .rst_n, .in_valid(ci_v), .x(ci), .out_valid(fi_v), .y(tbt_i), .overrun(ovi));
  fir_decim #(.IN_W(IQ_W), .OUT_W(IQ_W), .TAPS(FIR_TAPS), .D(1), .MACS(FIR_MACS),
              .COEF_FILE(FIR_FILE)) u_fir_q (
    .clk, .rst_n, .in_valid(cq_v), .x(cq), .out_valid(fq_v), .y(tbt_q), .overrun(ovq));

  assign tbt_valid = fi_v;
  assign overrun   = ovi | ovq;

  quad_adjust #(.W(IQ_W)) u_quad (
    .clk, .rst_n, .in_valid(fi_v), .i_in(tbt_i), .q_in(tbt_q),
    .out_valid(qa_v), .i_out(qa_i), .q_out(qa_q), .rotated);

  cordic_mag #(.W(IQ_W+1), .CELLS(CELLS)) u_cordic (
    .clk, .rst_n, .in_valid(qa_v), .i_in(qa_i), .q_in(qa_q),
    .out_valid(amp_valid), .mag(amp));

  // I and Q paths are identical and run in lockstep.
  a_iq_lockstep: assert property (@(posedge clk) disable iff (!rst_n) fi_v == fq_v);
  a_cic_lockstep: assert property (@(posedge clk) disable iff (!rst_n) ci_v == cq_v);

endmodule
