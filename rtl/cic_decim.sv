// Cascaded integrator-comb (CIC) decimator.
//
// N integrators run at the input rate, the output is taken on every R-th
// input, and N combs (differential delay 1) run at the output rate. The
// impulse response is that of N cascaded length-R boxcars, so the filter
// needs adders only. The five-stage form and the factors 12 (54.4 MHz to
// turn-by-turn), 90 (turn-by-turn towards FA) and 100 (FA towards SA) follow
// the design; R defaults to the first of them. The integrators are
// pipelined (each adds its predecessor's registered value), which delays the
// response by N-1 input samples: output m is the N-fold boxcar sum ending
// at input sample (m+1)R-1-(N-1).
//
// The registers are IN_W + G bits wide, G = ceil(N*log2 R), so the modulo
// arithmetic of the integrators gives the exact result. The output is the
// top OUT_W bits of the comb result, i.e. the DC gain is R^N / 2^G scaled by
// 2^(OUT_W-IN_W). out_valid pulses two clocks after the R-th input sample of
// each block. The comb section is evaluated combinationally in one clock.
module cic_decim
  import bpm_pkg::*;
#(
  parameter int unsigned IN_W  = 17,
  parameter int unsigned OUT_W = 24,
  parameter int unsigned R     = 12,
  parameter int unsigned N     = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                   out_valid,
  output logic signed [OUT_W-1:0] y
);
  localparam int unsigned G   = cic_growth(R, N);
  localparam int unsigned AW  = IN_W + G;
  localparam int unsigned RW  = (R > 1) ? $clog2(R) : 1;

  typedef logic signed [AW-1:0] acc_t;

  acc_t integ [N];
  acc_t comb_d [N];     // comb delay registers (previous output-rate value)
  acc_t comb_v [N+1];   // comb chain, combinational
  logic [RW-1:0] dcnt;
  logic          take;

  assign take = in_valid && (dcnt == RW'(R - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) integ[s] <= '0;
      dcnt <= '0;
    end else if (in_valid) begin
      integ[0] <= integ[0] + AW'(x);
      for (int s = 1; s < N; s++) integ[s] <= integ[s] + integ[s-1];
      dcnt <= (dcnt == RW'(R - 1)) ? '0 : dcnt + 1'b1;
    end
  end

  // The comb section reads the last integrator in the clock after the R-th
  // sample, when it holds the value that includes that sample.
  logic take_d;
  assign comb_v[0] = integ[N-1];
  for (genvar s = 0; s < N; s++) begin : g_comb
    assign comb_v[s+1] = comb_v[s] - comb_d[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) comb_d[s] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
      take_d    <= 1'b0;
    end else begin
      take_d    <= take;
      out_valid <= take_d;
      if (take_d) begin
        for (int s = 0; s < N; s++) comb_d[s] <= comb_v[s];
        y <= comb_v[N][AW-1 -: OUT_W];
      end
    end
  end

endmodule
