// Quadrant adjustment ahead of the CORDIC.
//
// The vectoring CORDIC used for the amplitude converges only for angles
// within about +/-99.7 degrees, so vectors in the second and third quadrant
// are rotated by 180 degrees: if I < 0 the block outputs (-I, -Q). The
// magnitude is unchanged and the output I is never negative. The output is
// one bit wider than the input so that negation cannot overflow. One clock
// of latency; rotated pulses when the rotation was applied.
module quad_adjust #(
  parameter int unsigned W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic                out_valid,
  output logic signed [W:0]   i_out,
  output logic signed [W:0]   q_out,
  output logic                rotated
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
      rotated   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      rotated   <= in_valid && i_in[W-1];
      if (in_valid) begin
        if (i_in[W-1]) begin
          i_out <= -(W+1)'(i_in);
          q_out <= -(W+1)'(q_in);
        end else begin
          i_out <= (W+1)'(i_in);
          q_out <= (W+1)'(q_in);
        end
      end
    end
  end
endmodule
