// Decimation of the four electrode amplitudes to a lower data rate.
//
// Each amplitude goes through a five-stage CIC decimating by CIC_R and then
// a FIR with FIR_TAPS taps decimating by FIR_D. The design uses this twice:
// turn-by-turn to FA (CIC 90, FIR 69 taps / 5, total 450, 4.533 MHz to
// 10.07 kHz) and FA to SA (CIC 100, FIR 99 taps / 10, total 1000, to
// 10.07 Hz); the defaults are the first. All four channels run in lockstep,
// so the output strobe of channel A stands for all four. Each FIR uses one
// multiplier, which is ample at these rates (FIR_TAPS clocks per output
// against thousands of clocks between outputs).
module amp_decim
  import bpm_pkg::*;
#(
  parameter int unsigned CIC_R    = 90,
  parameter int unsigned CIC_N    = 5,
  parameter int unsigned FIR_TAPS = 69,
  parameter int unsigned FIR_D    = 5,
  parameter int unsigned FIR_MACS = 1,
  parameter string       FIR_FILE = "rtl/fir_fa_69.hex"
) (
  input  logic  clk,
  input  logic  rst_n,
  input  amp4_t amp_in,
  output amp4_t amp_out,
  output logic  overrun
);
  amp_t in_v  [NCH];
  amp_t cic_y [NCH];
  amp_t fir_y [NCH];
  logic [NCH-1:0] cic_v, fir_v, ov;

  assign in_v[0] = amp_in.a;
  assign in_v[1] = amp_in.b;
  assign in_v[2] = amp_in.c;
  assign in_v[3] = amp_in.d;

  for (genvar k = 0; k < NCH; k++) begin : g_ch
    cic_decim #(.IN_W(AMP_W), .OUT_W(AMP_W), .R(CIC_R), .N(CIC_N)) u_cic (
      .clk, .rst_n, .in_valid(amp_in.valid), .x(in_v[k]),
      .out_valid(cic_v[k]), .y(cic_y[k]));
    fir_decim #(.IN_W(AMP_W), .OUT_W(AMP_W), .TAPS(FIR_TAPS), .D(FIR_D),
                .MACS(FIR_MACS), .COEF_FILE(FIR_FILE)) u_fir (
      .clk, .rst_n, .in_valid(cic_v[k]), .x(cic_y[k]),
      .out_valid(fir_v[k]), .y(fir_y[k]), .overrun(ov[k]));
  end

  assign amp_out.valid = fir_v[0];
  assign amp_out.a     = fir_y[0];
  assign amp_out.b     = fir_y[1];
  assign amp_out.c     = fir_y[2];
  assign amp_out.d     = fir_y[3];
  assign overrun       = |ov;

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (&fir_v) == (|fir_v));

endmodule
