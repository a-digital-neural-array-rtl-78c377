// STDP timer: the single 8-bit timer of a neuron tile.
//
// The timer is cleared when the neuron fires (or is forced to fire) and then
// counts one per timestep, so on an input spike its value is directly the
// post-to-pre interval. Input spikes store the current value as a time stamp
// so the pre-to-post interval can be formed at the next fire. When the
// count reaches the tracking window `win` the timer stops (in silicon it is
// clock gated) and `stop_evt` tells the neuron to drop its stored stamps;
// the next input spike restarts it from 0. `post_ref` is high while the
// count measures time since the last fire, i.e. while post-to-pre pairs are
// valid.
//
// Reset on fire, increment per timestep, stop at the window and restart on
// an input or forced spike follow the published description; dropping the
// stored stamps at the stop is this design's choice.
//
// Timing: `tick` is the one-cycle start-of-timestep pulse. `fire` and
// `in_spike` are one-cycle pulses during the timestep; `fire` wins.
module stdp_timer
  import dna_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tick,
  input  logic           fire,
  input  logic           in_spike,
  input  logic [T_W-1:0] win,
  output logic [T_W-1:0] t,
  output logic           running,
  output logic           post_ref,
  output logic           stop_evt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; running <= 1'b0; post_ref <= 1'b0; stop_evt <= 1'b0;
    end else begin
      stop_evt <= 1'b0;
      if (fire) begin
        t <= '0; running <= 1'b1; post_ref <= 1'b1;
      end else if (in_spike && !running) begin
        t <= '0; running <= 1'b1; post_ref <= 1'b0;
      end else if (tick && running) begin
        if (t >= win - 1'b1) begin
          t <= win; running <= 1'b0; post_ref <= 1'b0; stop_evt <= 1'b1;
        end else begin
          t <= t + 1'b1;
        end
      end
    end
  end
endmodule
