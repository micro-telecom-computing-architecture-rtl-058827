// IQ preprocessing of one channel.
//
// The 408 MHz signal is sampled at 108.8 MHz = 4*408/(4n-1) with n = 4, so
// the phase steps by 90 degrees per sample and consecutive samples are
// I, Q', -I, -Q', I, ... (Q' = -Q for the 4n-1 case, Q for 4n+1; the sign
// of Q does not affect the amplitude). This block splits the stream
// into two streams at half the rate (decimation by two) and reverses the
// sign of every other sample of each, giving I and Q at 54.4 MHz.
//
// A phase counter, cleared by reset, labels the samples; the first sample
// after reset is taken as I. Which sample is called I only rotates the
// (I, Q) vector and does not change the amplitude computed later. The
// output is one bit wider than the input so that negating the most negative
// code cannot overflow. iq_valid pulses on every second input sample, one
// clock after the Q sample arrived.
module iq_demux #(
  parameter int unsigned IN_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                  iq_valid,
  output logic signed [IN_W:0]  i_out,
  output logic signed [IN_W:0]  q_out
);
  logic [1:0]            phase;
  logic signed [IN_W:0]  i_hold;
  logic signed [IN_W:0]  xe;

  assign xe = (IN_W+1)'(x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= '0;
      i_hold   <= '0;
      i_out    <= '0;
      q_out    <= '0;
      iq_valid <= 1'b0;
    end else begin
      iq_valid <= 1'b0;
      if (in_valid) begin
        phase <= phase + 2'd1;
        unique case (phase)
          2'd0: i_hold <= xe;
          2'd1: begin i_out <= i_hold; q_out <= xe;  iq_valid <= 1'b1; end
          2'd2: i_hold <= -xe;
          2'd3: begin i_out <= i_hold; q_out <= -xe; iq_valid <= 1'b1; end
        endcase
      end
    end
  end
endmodule
