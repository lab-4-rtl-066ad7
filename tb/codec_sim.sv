// codec_sim: behavioural model of the audio codec side, for simulation only.
// Raises new_frame for one clock every PERIOD clocks (2083 clocks is 48 kHz at
// 100 MHz; short periods such as 5 speed up simulation) and records the sample
// presented to it at each frame. frames counts the frames issued.
module codec_sim #(
  parameter int PERIOD = 5
) (
  input  logic               clk,
  input  logic               reset,
  input  logic signed [15:0] sample,
  output logic               new_frame,
  output logic signed [15:0] last_sample,
  output int                 frames
);
  int count;

  always_ff @(posedge clk) begin
    if (reset) begin
      count       <= 0;
      new_frame   <= 1'b0;
      frames      <= 0;
      last_sample <= '0;
    end else begin
      count     <= (count == PERIOD - 1) ? 0 : count + 1;
      new_frame <= (count == PERIOD - 1);
      if (new_frame) begin
        frames      <= frames + 1;
        last_sample <= sample;
      end
    end
  end
endmodule
