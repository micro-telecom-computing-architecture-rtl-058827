// Difference-over-sum beam position.
//
// From the four electrode amplitudes VA..VD:
//   X = Kx * ((VB + VC) - (VA + VD)) / S + Xoff
//   Y = Ky * ((VA + VB) - (VC + VD)) / S + Yoff,   S = VA + VB + VC + VD
// Kx and Ky are the position coefficients in nm (e.g. 10 mm = 10_000_000),
// Xoff and Yoff offsets in nm; the outputs are signed nm. The two ratios
// come from pipelined dividers (RATIO_FRAC fraction bits), then one
// multiply-add per axis. Stages: sums (1 clock), division (RATIO_FRAC+1),
// scaling (1): the latency is RATIO_FRAC+3 clocks and a new set of
// amplitudes is accepted every clock. The products are truncated towards
// minus infinity. A zero sum gives X = Xoff, Y = Yoff with div_zero set.
module dos_position
  import bpm_pkg::*;
#(
  parameter int unsigned FRAC = RATIO_FRAC
) (
  input  logic           clk,
  input  logic           rst_n,
  input  amp4_t          amp,
  input  logic [K_W-1:0] kx,
  input  logic [K_W-1:0] ky,
  input  pos_t           x_off,
  input  pos_t           y_off,
  output pos_sample_t    pos,
  output logic           div_zero
);
  localparam int unsigned SUMW = AMP_W + 2;     // unsigned sum of four
  localparam int unsigned DIFW = AMP_W + 3;     // signed difference
  localparam int unsigned QW   = FRAC + 2;
  localparam int unsigned PRW  = QW + K_W + 1;

  logic                   s1_v;
  logic [SUMW-1:0]        s1_sum;
  logic signed [DIFW-1:0] s1_dx, s1_dy;

  // Amplitudes are non-negative; negative inputs are treated as zero.
  logic [AMP_W-1:0] va, vb, vc, vd;
  assign va = amp.a[AMP_W-1] ? '0 : amp.a;
  assign vb = amp.b[AMP_W-1] ? '0 : amp.b;
  assign vc = amp.c[AMP_W-1] ? '0 : amp.c;
  assign vd = amp.d[AMP_W-1] ? '0 : amp.d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_sum <= '0; s1_dx <= '0; s1_dy <= '0;
    end else begin
      s1_v   <= amp.valid;
      s1_sum <= SUMW'(va) + SUMW'(vb) + SUMW'(vc) + SUMW'(vd);
      s1_dx  <= (DIFW'(vb) + DIFW'(vc)) - (DIFW'(va) + DIFW'(vd));
      s1_dy  <= (DIFW'(va) + DIFW'(vb)) - (DIFW'(vc) + DIFW'(vd));
    end
  end

  // The sum travels alongside the dividers.
  logic [SUMW-1:0] sum_dly [FRAC+2];
  assign sum_dly[0] = s1_sum;
  for (genvar i = 0; i < FRAC + 1; i++) begin : g_sdly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sum_dly[i+1] <= '0;
      else        sum_dly[i+1] <= sum_dly[i];
    end
  end

  logic d_v, d_vy, dzx, dzy;
  logic signed [QW-1:0] rx, ry;

  frac_div #(.NW(DIFW), .DWD(SUMW), .FRAC(FRAC)) u_div_x (
    .clk, .rst_n, .in_valid(s1_v), .num(s1_dx), .den(s1_sum),
    .out_valid(d_v), .q(rx), .dz(dzx));
  frac_div #(.NW(DIFW), .DWD(SUMW), .FRAC(FRAC)) u_div_y (
    .clk, .rst_n, .in_valid(s1_v), .num(s1_dy), .den(s1_sum),
    .out_valid(d_vy), .q(ry), .dz(dzy));

  logic signed [PRW-1:0] px, py;
  assign px = PRW'(rx) * PRW'($signed({1'b0, kx}));
  assign py = PRW'(ry) * PRW'($signed({1'b0, ky}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos      <= '0;
      div_zero <= 1'b0;
    end else begin
      pos.valid <= d_v;
      div_zero  <= dzx | dzy;
      if (d_v) begin
        pos.x   <= POS_W'(px >>> FRAC) + x_off;
        pos.y   <= POS_W'(py >>> FRAC) + y_off;
        pos.sum <= sum_dly[FRAC+1];
      end
    end
  end

  // Both dividers run in lockstep.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) d_v == d_vy);

endmodule
