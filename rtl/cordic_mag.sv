// Pipelined CORDIC in vectoring mode: amplitude sqrt(I^2 + Q^2).
//
// Each of the CELLS cells (7 in the design) rotates the vector by
// +/-atan(2^-i) towards the I axis using shifts and adds only:
//   if Q >= 0: I += Q >>> i, Q -= I >>> i   else: I -= Q >>> i, Q += I >>> i
// After the last cell I holds the magnitude times the CORDIC gain
// K = prod sqrt(1 + 2^-2i), about 1.6468 for 7 cells. The gain is left in:
// the position is a ratio of amplitudes, where it cancels. The input must
// have I >= 0 (see quad_adjust). The internal width is W + 2 bits, enough
// for the gain of at most 1.647 * sqrt(2). One cell per clock: the latency
// is CELLS clocks and a new vector is accepted every clock.
module cordic_mag #(
  parameter int unsigned W     = 25,
  parameter int unsigned CELLS = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  i_in,
  input  logic signed [W-1:0]  q_in,
  output logic                 out_valid,
  output logic signed [W+1:0]  mag
);
  localparam int unsigned IW = W + 2;
  typedef logic signed [IW-1:0] v_t;

  v_t   xs [CELLS+1];
  v_t   ys [CELLS+1];
  logic vs [CELLS+1];

  assign xs[0] = IW'(i_in);
  assign ys[0] = IW'(q_in);
  assign vs[0] = in_valid;

  for (genvar c = 0; c < CELLS; c++) begin : g_cell
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[c+1] <= '0;
        ys[c+1] <= '0;
        vs[c+1] <= 1'b0;
      end else begin
        vs[c+1] <= vs[c];
        if (!ys[c][IW-1]) begin
          xs[c+1] <= xs[c] + (ys[c] >>> c);
          ys[c+1] <= ys[c] - (xs[c] >>> c);
        end else begin
          xs[c+1] <= xs[c] - (ys[c] >>> c);
          ys[c+1] <= ys[c] + (xs[c] >>> c);
        end
      end
    end
  end

  assign mag       = xs[CELLS];
  assign out_valid = vs[CELLS];
endmodule
