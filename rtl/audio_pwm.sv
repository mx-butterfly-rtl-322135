// audio_pwm: pulse-width modulator that stands in for the POKEY's analog
// audio output. A free-running W-bit counter is compared with the sample
// level; pwm is high while the counter is below the level, so its average
// is level / 2**W. The level is sampled at the start of each PWM period so
// a period is never cut short. Replacing the analog output with PWM follows
// the description; the width of 6 bits (the POKEY mix is at most 60) and the
// full-speed counter are this design's choices.
module audio_pwm #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] level,
  output logic         pwm
);

  logic [W-1:0] cnt, level_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      level_q <= '0;
      pwm     <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) level_q <= level;
      pwm <= (cnt == '1) ? (level != '0) : ((cnt + 1'b1) < level_q);
    end
  end

endmodule
