// Pipelined signed fractional divider: q = num / den with |num| <= den.
//
// Restoring long division on magnitudes, one quotient bit per pipeline
// stage, FRAC+1 stages in all: the first decides the integer bit (set only
// when |num| = den), the others the FRAC fraction bits. The quotient is
// truncated towards zero and carries the sign of num; it is a signed
// fixed-point number with FRAC fraction bits, in [-1, 1]. A zero divisor
// gives q = 0 and raises dz. A new division is accepted every clock; the
// latency is FRAC+1 clocks.
module frac_div #(
  parameter int unsigned NW   = 29,   // numerator width, signed
  parameter int unsigned DWD  = 29,   // divisor width, unsigned
  parameter int unsigned FRAC = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [NW-1:0] num,
  input  logic [DWD-1:0]       den,
  output logic                 out_valid,
  output logic signed [FRAC+1:0] q,
  output logic                 dz
);
  localparam int unsigned ST = FRAC + 1;
  localparam int unsigned RW = DWD + 1;   // remainder, one bit of headroom

  logic [RW-1:0]  rem  [ST+1];
  logic [DWD-1:0] dv   [ST+1];
  logic [FRAC:0]  qq   [ST+1];
  logic           neg  [ST+1];
  logic           zero [ST+1];
  logic           vld  [ST+1];

  logic [NW-1:0] mag;
  assign mag = num[NW-1] ? NW'(-num) : NW'(num);

  assign rem[0]  = RW'(mag);
  assign dv[0]   = den;
  assign qq[0]   = '0;
  assign neg[0]  = num[NW-1];
  assign zero[0] = (den == '0);
  assign vld[0]  = in_valid;

  for (genvar s = 0; s < ST; s++) begin : g_stage
    logic [RW-1:0] trial;
    // Stage 0 compares the remainder itself, later stages twice it.
    assign trial = (s == 0) ? rem[s] : (rem[s] << 1);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rem[s+1] <= '0; dv[s+1] <= '0; qq[s+1] <= '0;
        neg[s+1] <= 1'b0; zero[s+1] <= 1'b0; vld[s+1] <= 1'b0;
      end else begin
        dv[s+1]   <= dv[s];
        neg[s+1]  <= neg[s];
        zero[s+1] <= zero[s];
        vld[s+1]  <= vld[s];
        if (trial >= RW'(dv[s])) begin
          rem[s+1] <= trial - RW'(dv[s]);
          qq[s+1]  <= (qq[s] << 1) | (FRAC+1)'(1);
        end else begin
          rem[s+1] <= trial;
          qq[s+1]  <= qq[s] << 1;
        end
      end
    end
  end

  assign out_valid = vld[ST];
  assign dz        = vld[ST] && zero[ST];
  always_comb begin
    if (zero[ST])     q = '0;
    else if (neg[ST]) q = -(FRAC+2)'(qq[ST]);
    else              q = (FRAC+2)'(qq[ST]);
  end
endmodule
